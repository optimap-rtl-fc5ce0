// mlp_router: mesh router with four directional ports and NLP local ports.
//
// The router serves several logic cores at once: besides North, East, South
// and West it has NLP local ports, each attached to its own core's network
// interface. Packets are routed XY until they reach the destination router,
// where the header's LID field picks the local port. Flow control is
// store-and-forward: each input buffers a whole packet (channel_buffer) before
// it competes for its output. Each output has its own fixed-priority arbiter
// (output_arbiter), and a mux/demux cross point matrix (crosspoint_matrix)
// links inputs to outputs, so up to NLP+4 connections run in parallel.
//
// Ports are arrays over NLP+4 port indices: 0 North, 1 East, 2 South, 3 West,
// 4+k Local k.
//   in_valid/in_data/in_ready   : incoming link; in_ready = room for a packet.
//   out_valid/out_data/out_ready: outgoing link; out_ready is the downstream
//                                 buffer's in_ready.
// Timing: a packet completely stored at edge t leaves in the next cycle if its
// output is free and the downstream buffer has room, one flit per cycle, so a
// PKT_LEN-flit packet spends PKT_LEN cycles on each channel it crosses. The
// outgoing link is driven combinationally from the input buffer through the
// cross point; the next buffer registers it.
module mlp_router
  import noc_pkg::*;
#(
  parameter int unsigned NLP       = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned PKT_LEN   = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NLP+4],
  input  flit_t in_data   [NLP+4],
  output logic  in_ready  [NLP+4],
  output logic  out_valid [NLP+4],
  output flit_t out_data  [NLP+4],
  input  logic  out_ready [NLP+4]
);

  localparam int unsigned NP = NLP + 4;

  flit_t           head    [NP];
  logic            avail   [NP];
  logic [NP-1:0]   dest    [NP];   // per input: one-hot output
  logic [NP-1:0]   req     [NP];   // per output: requesting inputs
  logic [NP-1:0]   grant   [NP];   // per output: granted input
  logic [NP-1:0]   owned   [NP];   // per output: input locked mid-packet
  logic            xfer    [NP];
  logic [NP-1:0]   busy;           // inputs in the middle of a packet
  logic [NP-1:0]   rd;             // inputs popped this cycle

  for (genvar i = 0; i < NP; i++) begin : g_in
    channel_buffer #(.DEPTH(BUF_DEPTH), .PKT_LEN(PKT_LEN)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_data  (in_data[i]),
      .in_ready (in_ready[i]),
      .pkt_avail(avail[i]),
      .head     (head[i]),
      .rd_en    (rd[i])
    );
    route_decode #(.NLP(NLP), .MY_X(MY_X), .MY_Y(MY_Y)) u_dec (
      .hdr (head[i]),
      .port(dest[i])
    );
  end

  always_comb begin
    busy = '0;
    rd   = '0;
    for (int o = 0; o < NP; o++) begin
      busy = busy | owned[o];
      rd   = rd | grant[o];
    end
  end

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      for (int i = 0; i < NP; i++) begin
        req[o][i] = avail[i] && !busy[i] && dest[i][o];
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    output_arbiter #(.NIN(NP), .PKT_LEN(PKT_LEN)) u_arb (
      .clk, .rst_n,
      .req     (req[o]),
      .dn_ready(out_ready[o]),
      .grant   (grant[o]),
      .xfer    (xfer[o]),
      .owned   (owned[o])
    );
    assign out_valid[o] = xfer[o];
  end

  crosspoint_matrix #(.NIN(NP), .NOUT(NP)) u_xp (
    .in (head),
    .sel(grant),
    .out(out_data)
  );

  // Each input is read by at most one output at a time.
  logic [NP-1:0] seen, twice;
  always_comb begin
    seen  = '0;
    twice = '0;
    for (int o = 0; o < NP; o++) begin
      twice = twice | (seen & grant[o]);
      seen  = seen | grant[o];
    end
  end
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) twice == '0);
  for (genvar i = 0; i < NP; i++) begin : g_chk
    hdr_t h;
    assign h = hdr_t'(head[i]);
    a_lid_exists: assert property (@(posedge clk) disable iff (!rst_n)
      (avail[i] && !busy[i] && h.x == X_W'(MY_X) && h.y == Y_W'(MY_Y)) |-> int'(h.lid) < NLP);
  end

endmodule
