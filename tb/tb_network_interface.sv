// tb_network_interface: self-checking test of the core-side interface.
// The interface sits at router (1,1). Send side: four requests to
// destinations 0, 1, 3 and 2 hops away are queued while the router has no
// room; once room appears they must leave farthest first (3, 2, 1, 0), each as
// PKT_LEN consecutive flits with the header first. Also checked: tx_ready
// drops when all four slots are taken, a request taken with the link idle
// starts in the next cycle, and random requests all leave intact. Receive
// side: packets driven into the interface must be presented one cycle after
// their last flit, with header and payload intact.
module tb_network_interface;
  import noc_pkg::*;

  localparam int unsigned PKT_LEN = 8, QDEPTH = 4, MX = 1, MY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_valid = 1'b0, tx_ready;
  hdr_t tx_hdr = '0;
  flit_t [PKT_LEN-2:0] tx_payload = '0;
  logic out_valid, out_ready = 1'b0;
  flit_t out_data;
  logic in_valid = 1'b0, in_ready;
  flit_t in_data = '0;
  logic rx_valid;
  hdr_t rx_hdr;
  flit_t [PKT_LEN-2:0] rx_payload;
  logic [X_W+Y_W-1:0] sending_dist;

  network_interface #(.MY_X(MX), .MY_Y(MY), .PKT_LEN(PKT_LEN), .QDEPTH(QDEPTH)) dut (.*);

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

  // Collect transmitted packets.
  flit_t cur [PKT_LEN];
  int    nf = 0;
  flit_t got [$][PKT_LEN];
  longint got_start [$];
  longint first_cycle;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (nf == 0) first_cycle = cycle;
      cur[nf] = out_data;
      nf = nf + 1;
      if (nf == PKT_LEN) begin
        check(cycle - first_cycle == PKT_LEN - 1, "packet flits not on consecutive cycles");
        got.push_back(cur);
        got_start.push_back(first_cycle);
        nf = 0;
      end
    end
  end

  task automatic request(hdr_t h, flit_t [PKT_LEN-2:0] p);
    @(posedge clk); #1;
    tx_valid = 1'b1; tx_hdr = h; tx_payload = p;
    #1 while (!tx_ready) begin @(posedge clk); #2; end
    @(posedge clk); #1;
    tx_valid = 1'b0;
  endtask

  function automatic int dist_ref(hdr_t h);
    int dx, dy;
    dx = int'(h.x) - int'(MX); dy = int'(h.y) - int'(MY);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  hdr_t hs [4];
  flit_t [PKT_LEN-2:0] ps [4];

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // --- distance ordering
    hs[0] = '{lid: 4'd1, x: 2'd1, y: 2'd1};   // 0 hops (same router)
    hs[1] = '{lid: 4'd0, x: 2'd2, y: 2'd1};   // 1 hop
    hs[2] = '{lid: 4'd3, x: 2'd3, y: 2'd2};   // 3 hops
    hs[3] = '{lid: 4'd2, x: 2'd0, y: 2'd0};   // 2 hops
    for (int n = 0; n < 4; n++) begin
      for (int f = 0; f < PKT_LEN - 1; f++) ps[n][f] = flit_t'($urandom);
      request(hs[n], ps[n]);
    end
    #1 check(!tx_ready, "tx_ready must drop with all slots taken");
    check(!out_valid, "nothing sent without room in the router");
    @(posedge clk); #1 out_ready = 1'b1;
    repeat (4 * PKT_LEN + 4) @(posedge clk);
    check(got.size() == 4, $sformatf("%0d of 4 packets sent", got.size()));
    begin
      int order [4] = '{2, 3, 1, 0};
      for (int n = 0; n < 4 && n < got.size(); n++) begin
        int k;
        k = order[n];
        check(got[n][0] == flit_t'(hs[k]),
              $sformatf("packet %0d: header %02h, expected the %0d-hop one %02h",
                        n, got[n][0], dist_ref(hs[k]), flit_t'(hs[k])));
        for (int f = 1; f < PKT_LEN; f++)
          check(got[n][f] == ps[k][f-1], "payload flit mismatch");
        if (n > 0) check(got_start[n] - got_start[n-1] == PKT_LEN, "packets not back to back");
      end
    end

    // --- start latency: request taken at edge t leaves at t+1
    got.delete(); got_start.delete();
    begin
      longint taken;
      @(posedge clk); #1;
      tx_valid = 1'b1; tx_hdr = hs[1]; tx_payload = ps[1];
      @(posedge clk); taken = cycle; #1 tx_valid = 1'b0;
      repeat (PKT_LEN + 2) @(posedge clk);
      check(got.size() == 1 && got_start[0] == taken + 1,
            $sformatf("start latency: taken %0d, sent %0d", taken, got.size() ? got_start[0] : -1));
    end

    // --- random requests with random room
    got.delete(); got_start.delete();
    fork
      for (int n = 0; n < 40; n++) begin
        hdr_t h;
        flit_t [PKT_LEN-2:0] p;
        h = hdr_t'($urandom);
        for (int f = 0; f < PKT_LEN - 1; f++) p[f] = flit_t'($urandom);
        p[0] = flit_t'(n);
        request(h, p);
      end
      repeat (600) begin
        @(posedge clk); #1 out_ready = 1'($urandom);
      end
    join
    out_ready = 1'b1;
    repeat (8 * PKT_LEN) @(posedge clk);
    check(got.size() == 40, $sformatf("%0d of 40 random packets sent", got.size()));
    begin
      bit seen [40];
      for (int n = 0; n < got.size(); n++) if (got[n][1] < 40) seen[got[n][1]] = 1;
      for (int n = 0; n < 40; n++) check(seen[n], $sformatf("random packet %0d missing", n));
    end

    // --- receive side
    for (int n = 0; n < 10; n++) begin
      flit_t f [PKT_LEN];
      for (int k = 0; k < PKT_LEN; k++) f[k] = flit_t'($urandom);
      check(in_ready, "receive side always ready");
      for (int k = 0; k < PKT_LEN; k++) begin
        @(posedge clk); #1;
        in_valid = 1'b1; in_data = f[k];
        if (k > 1) check(!rx_valid, "rx_valid before the packet is complete");
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      in_data = '0;
      check(rx_valid, "rx_valid one cycle after the last flit");
      check(rx_hdr == hdr_t'(f[0]), "received header");
      for (int k = 1; k < PKT_LEN; k++) check(rx_payload[k-1] == f[k], "received payload");
      @(posedge clk); #1;
      check(!rx_valid, "rx_valid lasts one cycle");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
