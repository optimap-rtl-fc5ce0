// output_arbiter: arbiter of one router output channel.
//
// Every output channel has its own arbiter; there is no central arbiter, so
// all outputs can be connected to different inputs at the same time (n+4
// parallel connections in a router with n local ports). The grant is decided
// inside one FSM state by a fixed-priority if-then-else chain: the lowest
// numbered requesting input wins and no cycle is spent on arbitration, at the
// price of fairness. Which input gets which priority is this design's choice
// (port order North, East, South, West, Local0, Local1, ...).
//
// Interface
//   req[i]   : input i holds a complete packet for this output.
//   dn_ready : the downstream buffer has room for a whole packet.
//   grant    : one-hot, the input whose flit crosses this output this cycle.
//   xfer     : a flit crosses this output this cycle (grant is non-zero).
//   owned    : one-hot, the input this output is locked to for the rest of
//              a packet (zero in the cycle of the header and when idle).
// Timing: in IDLE, a request seen together with dn_ready is granted in the
// same cycle and the header flit moves in that cycle; the grant is then held
// for PKT_LEN cycles in total, one flit per cycle.
module output_arbiter #(
  parameter int unsigned NIN     = 8,
  parameter int unsigned PKT_LEN = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] req,
  input  logic           dn_ready,
  output logic [NIN-1:0] grant,
  output logic           xfer,
  output logic [NIN-1:0] owned
);

  localparam int unsigned PW = (PKT_LEN > 1) ? $clog2(PKT_LEN) : 1;

  typedef enum logic {IDLE, SEND} state_e;

  state_e         state;
  logic [NIN-1:0] owner;
  logic [PW-1:0]  sent;     // flits of the current packet already sent
  logic [NIN-1:0] pick;

  // Fixed priority: lowest index first.
  always_comb begin
    pick = '0;
    for (int i = 0; i < NIN; i++) begin
      if (req[i] && pick == '0) pick[i] = 1'b1;
    end
  end

  always_comb begin
    grant = '0;
    if (state == SEND)  grant = owner;
    else if (dn_ready)  grant = pick;
  end

  assign xfer  = (grant != '0);
  assign owned = (state == SEND) ? owner : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      owner <= '0;
      sent  <= '0;
    end else begin
      unique case (state)
        IDLE: if (xfer && PKT_LEN > 1) begin
          state <= SEND;
          owner <= pick;
          sent  <= PW'(1);
        end
        SEND: begin
          if (sent == PW'(PKT_LEN - 1)) begin
            state <= IDLE;
            owner <= '0;
            sent  <= '0;
          end else begin
            sent <= sent + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req:    assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == IDLE && xfer) |-> (grant & req) == grant);

endmodule
