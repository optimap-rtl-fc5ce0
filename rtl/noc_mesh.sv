// noc_mesh: a 2-D mesh network-on-chip built from multi-local-port routers.
//
// The network saves area by attaching several logic cores to one router
// instead of giving each core a router of its own. The mesh has COLS x ROWS
// routers; router r = y*COLS + x sits at column x, row y and has LP_CNT[r]
// local ports, each with a network_interface to one core. Routers may differ
// in their number of local ports; LP_CNT has one entry for each of the up to
// 16 routers the header's 2-bit X and Y fields can address, and entries past
// ROWS*COLS are ignored. Cores are numbered router by router: the
// cores of router 0 first (local port 0 upwards), then those of router 1, and
// so on. A core is addressed by the header fields (X, Y, LID) of its router
// and local port.
//
// The default is one optimum layout for nine cores from the design's
// evaluation (the LU decomposition task graph with at most four local ports
// per router): a 1x3 mesh whose routers carry 4, 4 and 1 cores.
//
// Interface (per core c, arrays over NCORES)
//   tx_valid/tx_ready/tx_hdr/tx_payload : send request into the core's NI.
//   rx_valid/rx_hdr/rx_payload          : packet delivered to the core.
//   tx_dist                             : hop distance of a packet whose
//                                         transmission starts this cycle.
// Timing: a packet of PKT_LEN flits crossing h inter-router channels takes
// PKT_LEN*(h+2) cycles from its first flit leaving the NI to its last flit
// reaching the destination NI (store-and-forward on every channel, the NI to
// router and router to NI channels included), when nothing is in its way.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS      = 3,
  parameter int unsigned ROWS      = 1,
  parameter int unsigned NCORES    = 9,
  parameter int unsigned LP_CNT [16] = '{0: 4, 1: 4, 2: 1, default: 0},
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned PKT_LEN   = 8,
  parameter int unsigned QDEPTH    = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tx_valid   [NCORES],
  output logic                tx_ready   [NCORES],
  input  hdr_t                tx_hdr     [NCORES],
  input  flit_t [PKT_LEN-2:0] tx_payload [NCORES],
  output logic                rx_valid   [NCORES],
  output hdr_t                rx_hdr     [NCORES],
  output flit_t [PKT_LEN-2:0] rx_payload [NCORES],
  output logic [X_W+Y_W-1:0]  tx_dist    [NCORES]
);

  localparam int unsigned NR = ROWS * COLS;

  function automatic int unsigned core_base(int unsigned r);
    int unsigned s = 0;
    for (int unsigned j = 0; j < r; j++) s += LP_CNT[j];
    return s;
  endfunction

  // Directional links, indexed by router and direction.
  logic  dout_v   [NR][NDIR];   // router r drives out of side d
  flit_t dout_d   [NR][NDIR];
  logic  din_rdy  [NR][NDIR];   // router r's input buffer on side d has room

  if (core_base(NR) != NCORES) begin : g_bad_ncores
    $error("noc_mesh: NCORES must equal the sum of LP_CNT");
  end
  if (COLS > (1 << X_W) || ROWS > (1 << Y_W) || NR > 16) begin : g_bad_size
    $error("noc_mesh: mesh larger than the header's X/Y fields");
  end

  for (genvar r = 0; r < NR; r++) begin : g_r
    localparam int unsigned X    = r % COLS;
    localparam int unsigned Y    = r / COLS;
    localparam int unsigned NLP  = LP_CNT[r];
    localparam int unsigned BASE = core_base(r);

    logic  rin_v   [NLP+4];
    flit_t rin_d   [NLP+4];
    logic  rin_rdy [NLP+4];
    logic  rout_v  [NLP+4];
    flit_t rout_d  [NLP+4];
    logic  rout_rdy[NLP+4];

    // Neighbour on each side, or none at the mesh edge.
    for (genvar d = 0; d < NDIR; d++) begin : g_dir
      localparam bit HAS_N =
        (d == P_NORTH) ? (Y > 0) :
        (d == P_SOUTH) ? (Y + 1 < ROWS) :
        (d == P_WEST)  ? (X > 0) : (X + 1 < COLS);
      localparam int unsigned NB =
        (d == P_NORTH) ? r - COLS :
        (d == P_SOUTH) ? r + COLS :
        (d == P_WEST)  ? r - 1 : r + 1;
      localparam int unsigned OPP = (d + 2) % 4;

      assign dout_v[r][d]  = rout_v[d];
      assign dout_d[r][d]  = rout_d[d];
      assign din_rdy[r][d] = rin_rdy[d];
      if (HAS_N) begin : g_link
        assign rin_v[d]    = dout_v[NB][OPP];
        assign rin_d[d]    = dout_d[NB][OPP];
        assign rout_rdy[d] = din_rdy[NB][OPP];
      end else begin : g_edge
        assign rin_v[d]    = 1'b0;
        assign rin_d[d]    = '0;
        assign rout_rdy[d] = 1'b0;
      end
    end

    mlp_router #(
      .NLP(NLP), .MY_X(X), .MY_Y(Y), .BUF_DEPTH(BUF_DEPTH), .PKT_LEN(PKT_LEN)
    ) u_router (
      .clk, .rst_n,
      .in_valid (rin_v),
      .in_data  (rin_d),
      .in_ready (rin_rdy),
      .out_valid(rout_v),
      .out_data (rout_d),
      .out_ready(rout_rdy)
    );

    for (genvar k = 0; k < NLP; k++) begin : g_lp
      network_interface #(
        .MY_X(X), .MY_Y(Y), .PKT_LEN(PKT_LEN), .QDEPTH(QDEPTH)
      ) u_ni (
        .clk, .rst_n,
        .tx_valid    (tx_valid[BASE+k]),
        .tx_ready    (tx_ready[BASE+k]),
        .tx_hdr      (tx_hdr[BASE+k]),
        .tx_payload  (tx_payload[BASE+k]),
        .out_valid   (rin_v[NDIR+k]),
        .out_data    (rin_d[NDIR+k]),
        .out_ready   (rin_rdy[NDIR+k]),
        .in_valid    (rout_v[NDIR+k]),
        .in_data     (rout_d[NDIR+k]),
        .in_ready    (rout_rdy[NDIR+k]),
        .rx_valid    (rx_valid[BASE+k]),
        .rx_hdr      (rx_hdr[BASE+k]),
        .rx_payload  (rx_payload[BASE+k]),
        .sending_dist(tx_dist[BASE+k])
      );
    end
  end

endmodule
