// channel_buffer: store-and-forward input channel buffer of one router port.
//
// Each router input owns one of these FIFOs (16 flits of 8 bits, the buffer
// size the router was characterised with). A packet is only offered to the
// router once all PKT_LEN of its flits are stored: that is store-and-forward
// flow control. Packets have a fixed length of PKT_LEN flits, header first;
// the fixed length and its default of 8 are this design's choices.
//
// Interface
//   in_valid/in_data : one flit written per cycle while in_valid is high.
//   in_ready         : there is room for a whole packet. The upstream sender
//                      samples it only before the first flit of a packet and
//                      then streams the packet without pauses.
//   pkt_avail        : at least one complete packet is stored and its header
//                      has not yet been read.
//   head             : the flit at the head of the FIFO (first-word
//                      fall-through), valid whenever the buffer is not empty.
//   rd_en            : pops the head flit.
// Timing: a packet whose last flit is written at clock edge t raises
// pkt_avail from edge t, so the router can forward it in the next cycle.
module channel_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned PKT_LEN = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_data,
  output logic  in_ready,
  output logic  pkt_avail,
  output flit_t head,
  input  logic  rd_en
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned PW = (PKT_LEN > 1) ? $clog2(PKT_LEN) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [CW-1:0]  count;
  logic [PW-1:0]  wr_phase, rd_phase;
  logic [CW-1:0]  pkts;            // complete packets whose header is unread

  logic wr_last, rd_first;
  assign wr_last  = in_valid && (wr_phase == PW'(PKT_LEN - 1));
  assign rd_first = rd_en && (rd_phase == '0);

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      wr_phase <= '0;
      rd_phase <= '0;
      pkts     <= '0;
    end else begin
      if (in_valid) begin
        wr_ptr   <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        wr_phase <= wr_last ? '0 : wr_phase + 1'b1;
      end
      if (rd_en) begin
        rd_ptr   <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        rd_phase <= (rd_phase == PW'(PKT_LEN - 1)) ? '0 : rd_phase + 1'b1;
      end
      count <= count + CW'(in_valid) - CW'(rd_en);
      pkts  <= pkts + CW'(wr_last) - CW'(rd_first);
    end
  end

  assign in_ready  = (CW'(DEPTH) - count) >= CW'(PKT_LEN);
  assign pkt_avail = (pkts != '0);
  assign head      = mem[rd_ptr];

  // A packet must fit in the buffer, and the flow control must hold.
  initial assert (PKT_LEN >= 1 && PKT_LEN <= DEPTH)
    else $error("channel_buffer: PKT_LEN must be between 1 and DEPTH");
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid |-> (count < CW'(DEPTH)) || rd_en);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> count != '0);

endmodule
