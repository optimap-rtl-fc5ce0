// tb_fig2_outtree: one core sending to four others, on a 2x2 mesh in which
// one router has two local ports (five cores on four routers).
// Placement: router (0,0) carries cores 0 and 1, (1,0) core 2, (0,1) core 3,
// (1,1) core 4. Core 0 sends one packet to each of cores 1..4, all requests
// queued at once. Expected, with PKT_LEN-flit store-and-forward channels and
// farthest-first sending: the first request (core 1, 0 hops) starts at once
// because the interface is idle; of the three queued behind it the 2-hop
// packet (core 4) goes first, then the two 1-hop packets (cores 2, 3);
// packet k starts at s+k*PKT_LEN and arrives PKT_LEN*(h+2) cycles after its
// start, so all four arrive within s+6*PKT_LEN and no packet crosses more
// than two router-to-router channels.
module tb_fig2_outtree;
  import noc_pkg::*;

  localparam int unsigned NCORES = 5, PKT_LEN = 8;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                tx_valid   [NCORES];
  logic                tx_ready   [NCORES];
  hdr_t                tx_hdr     [NCORES];
  flit_t [PKT_LEN-2:0] tx_payload [NCORES];
  logic                rx_valid   [NCORES];
  hdr_t                rx_hdr     [NCORES];
  flit_t [PKT_LEN-2:0] rx_payload [NCORES];
  logic [X_W+Y_W-1:0]  tx_dist    [NCORES];

  noc_mesh #(
    .COLS(2), .ROWS(2), .NCORES(NCORES), .LP_CNT('{0: 2, 1: 1, 2: 1, 3: 1, default: 0}), .PKT_LEN(PKT_LEN)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // core -> (x, y, lid), written out from the placement above
  int cx [NCORES] = '{0, 0, 1, 0, 1};
  int cy [NCORES] = '{0, 0, 0, 1, 1};
  int cl [NCORES] = '{0, 1, 0, 0, 0};
  longint arrive [NCORES];
  longint first_start;
  int max_hops = 0;

  for (genvar c = 1; c < NCORES; c++) begin : g_rx
    always @(posedge clk) if (rst_n && rx_valid[c]) begin
      arrive[c] = cycle;
      check(rx_payload[c][0] == flit_t'(c), $sformatf("core %0d got the packet for %0d", c, rx_payload[c][0]));
      if (cx[c] + cy[c] > max_hops) max_hops = cx[c] + cy[c];
    end
  end

  initial begin
    for (int c = 0; c < NCORES; c++) begin
      tx_valid[c] = 1'b0; tx_hdr[c] = '0; tx_payload[c] = '0; arrive[c] = -1;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // queue the four requests on consecutive cycles
    for (int d = 1; d < NCORES; d++) begin
      @(posedge clk); #1;
      tx_valid[0] = 1'b1;
      tx_hdr[0] = '{lid: LID_W'(cl[d]), x: X_W'(cx[d]), y: Y_W'(cy[d])};
      tx_payload[0] = '0;
      tx_payload[0][0] = flit_t'(d);
      #1 check(tx_ready[0], "request slot free");
      if (d == 1) first_start = cycle + 1;
    end
    @(posedge clk); #1 tx_valid[0] = 1'b0;
    repeat (12 * PKT_LEN) @(posedge clk);

    // The first request (0 hops, core 1) is taken while the interface is
    // idle, so it starts at once; the other three queue behind it and go
    // farthest first: core 4 (2 hops), then cores 2 and 3 (1 hop each).
    begin
      longint s;
      s = first_start;
      check(arrive[1] == s + 0 * PKT_LEN + PKT_LEN * 2, $sformatf("core 1 at %0d", arrive[1] - s));
      check(arrive[4] == s + 1 * PKT_LEN + PKT_LEN * 4, $sformatf("core 4 at %0d", arrive[4] - s));
      // the two 1-hop packets tie; which goes first depends on the slots
      // they occupy, so only the pair of arrival times is fixed
      check((arrive[2] == s + 2 * PKT_LEN + PKT_LEN * 3 && arrive[3] == s + 3 * PKT_LEN + PKT_LEN * 3) ||
            (arrive[3] == s + 2 * PKT_LEN + PKT_LEN * 3 && arrive[2] == s + 3 * PKT_LEN + PKT_LEN * 3),
            $sformatf("1-hop packets at %0d and %0d", arrive[2] - s, arrive[3] - s));
    end
    check(max_hops == 2, $sformatf("worst case %0d router hops, expected 2", max_hops));
    $display("arrivals after first start: core1=%0d core2=%0d core3=%0d core4=%0d",
             arrive[1] - first_start, arrive[2] - first_start, arrive[3] - first_start,
             arrive[4] - first_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
