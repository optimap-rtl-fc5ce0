// network_interface: connects one logic core to one local port of a router.
//
// Send side: the core hands over send requests (a destination header plus
// PKT_LEN-1 payload flits). Up to QDEPTH requests wait in the interface. When
// a core sends to several destinations, the interface sends the one farthest
// away first, measured in router hops under XY routing (a destination on the
// same router is 0 hops). Ordering by distance comes from the design
// description; sending the farthest first, and breaking ties by the lowest
// slot, is this design's choice: the long transfers start early and overlap
// with the short ones, and no header bit is spent on it.
// Receive side: the interface collects the PKT_LEN flits of an arriving
// packet and presents header and payload to the core for one cycle.
//
// Interface
//   tx_valid/tx_ready/tx_hdr/tx_payload : send request, taken when both valid
//                                         and ready are high.
//   out_valid/out_data/out_ready        : link into the router's local input.
//   in_valid/in_data/in_ready           : link from the router's local output;
//                                         in_ready is always high.
//   rx_valid/rx_hdr/rx_payload          : received packet, one-cycle strobe.
//   sending_dist                        : hop distance of the packet being
//                                         started this cycle (for monitoring).
// Timing: a request taken at edge t starts at t+1 if the link is free and the
// router buffer has room; its PKT_LEN flits then go out on consecutive
// cycles. rx_valid rises the cycle after the last flit arrives.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned MY_X    = 0,
  parameter int unsigned MY_Y    = 0,
  parameter int unsigned PKT_LEN = 8,
  parameter int unsigned QDEPTH  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // core send side
  input  logic                      tx_valid,
  output logic                      tx_ready,
  input  hdr_t                      tx_hdr,
  input  flit_t [PKT_LEN-2:0]       tx_payload,
  // towards the router
  output logic                      out_valid,
  output flit_t                     out_data,
  input  logic                      out_ready,
  // from the router
  input  logic                      in_valid,
  input  flit_t                     in_data,
  output logic                      in_ready,
  // core receive side
  output logic                      rx_valid,
  output hdr_t                      rx_hdr,
  output flit_t [PKT_LEN-2:0]       rx_payload,
  output logic [X_W+Y_W-1:0]        sending_dist
);

  localparam int unsigned QW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int unsigned PW = (PKT_LEN > 1) ? $clog2(PKT_LEN) : 1;
  localparam int unsigned DW = X_W + Y_W;

  // ---------------------------------------------------------------- send
  logic                 slot_v   [QDEPTH];
  hdr_t                 slot_hdr [QDEPTH];
  flit_t [PKT_LEN-2:0]  slot_pay [QDEPTH];

  logic [QW-1:0]        free_idx, sel_idx;
  logic                 have_free, have_req;
  logic [DW-1:0]        sel_dist;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int q = QDEPTH - 1; q >= 0; q--) begin
      if (!slot_v[q]) begin
        have_free = 1'b1;
        free_idx  = QW'(q);
      end
    end
  end

  // Farthest destination first; ties go to the lowest slot.
  always_comb begin
    logic [DW-1:0] d;
    have_req = 1'b0;
    sel_idx  = '0;
    sel_dist = '0;
    for (int q = 0; q < QDEPTH; q++) begin
      d = DW'(hop_distance(slot_hdr[q].x, slot_hdr[q].y, X_W'(MY_X), Y_W'(MY_Y)));
      if (slot_v[q] && (!have_req || d > sel_dist)) begin
        have_req = 1'b1;
        sel_idx  = QW'(q);
        sel_dist = d;
      end
    end
  end

  typedef enum logic {TX_IDLE, TX_SEND} tx_state_e;
  tx_state_e            tx_state;
  flit_t [PKT_LEN-2:0]  cur_pay;
  logic [PW-1:0]        tx_cnt;
  logic                 start;

  assign tx_ready = have_free;
  assign start    = (tx_state == TX_IDLE) && have_req && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    if (start) begin
      out_valid = 1'b1;
      out_data  = flit_t'(slot_hdr[sel_idx]);
    end else if (tx_state == TX_SEND) begin
      out_valid = 1'b1;
      out_data  = cur_pay[tx_cnt - 1'b1];
    end
  end
  assign sending_dist = start ? sel_dist : '0;

  always_ff @(posedge clk) begin
    if (tx_valid && have_free) begin
      slot_hdr[free_idx] <= tx_hdr;
      slot_pay[free_idx] <= tx_payload;
    end
    if (start) cur_pay <= slot_pay[sel_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < QDEPTH; q++) slot_v[q] <= 1'b0;
      tx_state <= TX_IDLE;
      tx_cnt   <= '0;
    end else begin
      if (start) slot_v[sel_idx] <= 1'b0;
      if (tx_valid && have_free) slot_v[free_idx] <= 1'b1;
      unique case (tx_state)
        TX_IDLE: if (start && PKT_LEN > 1) begin
          tx_state <= TX_SEND;
          tx_cnt   <= PW'(1);
        end
        TX_SEND: begin
          if (tx_cnt == PW'(PKT_LEN - 1)) begin
            tx_state <= TX_IDLE;
            tx_cnt   <= '0;
          end else begin
            tx_cnt <= tx_cnt + 1'b1;
          end
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- receive
  logic [PW-1:0] rx_cnt;

  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt     <= '0;
      rx_valid   <= 1'b0;
      rx_hdr     <= '0;
      rx_payload <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (in_valid) begin
        if (rx_cnt == '0) rx_hdr <= hdr_t'(in_data);
        else              rx_payload[rx_cnt - 1'b1] <= in_data;
        if (rx_cnt == PW'(PKT_LEN - 1)) begin
          rx_cnt   <= '0;
          rx_valid <= 1'b1;
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end
  end

  initial assert (PKT_LEN >= 2) else $error("network_interface: a packet needs a payload flit");

endmodule
