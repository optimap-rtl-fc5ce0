// tb_noc_mesh: end-to-end test of the mesh NoC at its default configuration.
// The default network is a 1x3 mesh whose routers carry 4, 4 and 1 cores
// (cores 0-3 on router (0,0), 4-7 on (1,0), 8 on (2,0)). Every packet carries
// a unique tag in its first two payload flits; a scoreboard checks that each
// packet reaches exactly the core its header names, intact.
// Directed phases check the unloaded latency, PKT_LEN*(h+2)+1 cycles from the
// request being taken to rx_valid for h inter-router channels, for a transfer
// inside one router (h=0) and across the mesh (h=2); farthest-first sending
// in the interface; and a hot spot. A random all-to-all phase follows.
// The mechanisms of the design are counted and each must occur at least
// once: transfers inside a router, transfers over 1 and 2 router-to-router
// channels, several connections active in one router at once, two inputs
// competing for one output, an interface choosing a farther destination over
// a nearer one, and an interface stalled because its router buffer was full.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int unsigned NCORES = 9, PKT_LEN = 8;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                tx_valid   [NCORES];
  logic                tx_ready   [NCORES];
  hdr_t                tx_hdr     [NCORES];
  flit_t [PKT_LEN-2:0] tx_payload [NCORES];
  logic                rx_valid   [NCORES];
  hdr_t                rx_hdr     [NCORES];
  flit_t [PKT_LEN-2:0] rx_payload [NCORES];
  logic [X_W+Y_W-1:0]  tx_dist    [NCORES];

  noc_mesh dut (.*);

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

  // Reference placement of the default configuration.
  function automatic int router_of(int c);
    return (c < 4) ? 0 : (c < 8) ? 1 : 2;
  endfunction
  function automatic hdr_t addr_of(int c);
    hdr_t h;
    h.x   = X_W'(router_of(c));
    h.y   = '0;
    h.lid = LID_W'((c < 8) ? c % 4 : 0);
    return h;
  endfunction
  function automatic int hops(int a, int b);
    int d = router_of(a) - router_of(b);
    return d < 0 ? -d : d;
  endfunction

  typedef struct {
    int src, dst;
    flit_t [PKT_LEN-2:0] pay;
    longint taken;
    longint arrived;
  } pkt_t;
  pkt_t pk [int];
  int   tag_ctr = 0;
  int   delivered = 0;
  int   n_local = 0, n_hop1 = 0, n_hop2 = 0;

  // Per-core request queues, driven by one process per core.
  int req_q [NCORES][$];

  task automatic post(int src, int dst);
    pkt_t p;
    p.src = src; p.dst = dst;
    for (int f = 0; f < PKT_LEN - 1; f++) p.pay[f] = flit_t'($urandom);
    p.pay[0] = flit_t'(tag_ctr);
    p.pay[1] = flit_t'(tag_ctr >> 8);
    p.taken = -1; p.arrived = -1;
    pk[tag_ctr] = p;
    req_q[src].push_back(tag_ctr);
    tag_ctr++;
  endtask

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    initial begin
      tx_valid[c] = 1'b0; tx_hdr[c] = '0; tx_payload[c] = '0;
      wait (rst_n);
      forever begin
        @(posedge clk); #1;
        tx_valid[c] = 1'b0;
        if (req_q[c].size() != 0) begin
          int t;
          t = req_q[c].pop_front();
          tx_valid[c] = 1'b1;
          tx_hdr[c] = addr_of(pk[t].dst);
          tx_payload[c] = pk[t].pay;
          #1;
          while (!tx_ready[c]) begin @(posedge clk); #2; end
          @(posedge clk);
          pk[t].taken = cycle;
          #1 tx_valid[c] = 1'b0;
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && rx_valid[c]) begin
        int t;
        t = int'({rx_payload[c][1], rx_payload[c][0]});
        if (!pk.exists(t)) check(0, $sformatf("core %0d got unknown tag %0d", c, t));
        else begin
          check(pk[t].arrived < 0, $sformatf("packet %0d delivered twice", t));
          check(pk[t].dst == c, $sformatf("packet %0d for core %0d arrived at core %0d", t, pk[t].dst, c));
          check(rx_payload[c] == pk[t].pay, $sformatf("packet %0d payload corrupted", t));
          check(rx_hdr[c] == addr_of(c), $sformatf("packet %0d header %02h", t, rx_hdr[c]));
          pk[t].arrived = cycle;
          delivered++;
          case (hops(pk[t].src, c))
            0: n_local++;
            1: n_hop1++;
            default: n_hop2++;
          endcase
        end
      end
    end
  end

  // ---- mechanism monitors (look inside the routers and interfaces)
  int n_parallel = 0, n_contend = 0, n_stall = 0, n_far_first = 0;
  always @(posedge clk) if (rst_n) begin
    int a;
    a = 0;
    for (int o = 0; o < 8; o++) a += int'(dut.g_r[0].u_router.out_valid[o]);
    if (a > 1) n_parallel++;
    for (int o = 0; o < 8; o++) if ($countones(dut.g_r[0].u_router.req[o]) > 1) n_contend++;
    for (int o = 0; o < 8; o++) if ($countones(dut.g_r[1].u_router.req[o]) > 1) n_contend++;
  end
  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_r[0].g_lp[k].u_ni.have_req && !dut.g_r[0].g_lp[k].u_ni.out_ready &&
          dut.g_r[0].g_lp[k].u_ni.tx_state == 1'b0) n_stall++;
      if (dut.g_r[0].g_lp[k].u_ni.start) begin
        // a farther destination chosen while a nearer one waits
        for (int q = 0; q < 4; q++)
          if (dut.g_r[0].g_lp[k].u_ni.slot_v[q] &&
              hop_distance(dut.g_r[0].g_lp[k].u_ni.slot_hdr[q].x, '0, '0, '0) < tx_dist[k]) begin
            n_far_first++;
            break;
          end
      end
    end
  end

  int start_dist [$];
  always @(posedge clk) if (rst_n && dut.g_r[0].g_lp[0].u_ni.start) start_dist.push_back(int'(tx_dist[0]));

  task automatic wait_all();
    int guard = 0;
    while (delivered < tag_ctr && guard < 20000) begin @(posedge clk); guard++; end
    check(delivered == tag_ctr, $sformatf("delivered %0d of %0d packets", delivered, tag_ctr));
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // A. latency inside one router (core 0 -> core 1) and across two channels
    post(0, 1);
    wait_all();
    check(pk[0].arrived - pk[0].taken == PKT_LEN * 2 + 1,
          $sformatf("intra-router latency %0d, expected %0d", pk[0].arrived - pk[0].taken, PKT_LEN * 2 + 1));
    post(0, 8);
    wait_all();
    check(pk[1].arrived - pk[1].taken == PKT_LEN * 4 + 1,
          $sformatf("two-hop latency %0d, expected %0d", pk[1].arrived - pk[1].taken, PKT_LEN * 4 + 1));

    // B. farthest first: core 0 is busy with one packet while three more
    //    (0, 1 and 2 hops away) queue; they must arrive far, middle, near.
    post(0, 2);
    post(0, 1); post(0, 4); post(0, 8);
    wait_all();
    check(start_dist.size() >= 6, "core 0 started every packet");
    if (start_dist.size() >= 6) begin
      // starts: (A) 0 and 2 hops, then the packet that kept the interface
      // busy (0 hops), then the queued ones farthest first: 2, 1, 0
      check(start_dist[3] == 2 && start_dist[4] == 1 && start_dist[5] == 0,
            $sformatf("start order by distance %0d %0d %0d, expected 2 1 0",
                      start_dist[3], start_dist[4], start_dist[5]));
    end

    // C. hot spot: all cores of router 0 send to core 8 at once (contention
    //    for router 0's East output; the interfaces stall on full buffers)
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 4; c++) post(c, 8);
    wait_all();

    // D. random all-to-all traffic
    for (int n = 0; n < 400; n++) begin
      int s, d;
      s = $urandom_range(0, NCORES - 1);
      d = $urandom_range(0, NCORES - 1);
      post(s, d);
    end
    wait_all();

    $display("delivered=%0d local=%0d one_hop=%0d two_hop=%0d parallel=%0d contention=%0d far_first=%0d stall=%0d",
             delivered, n_local, n_hop1, n_hop2, n_parallel, n_contend, n_far_first, n_stall);
    check(n_local > 0,     "no transfer inside a router");
    check(n_hop1 > 0,      "no transfer over one router-to-router channel");
    check(n_hop2 > 0,      "no transfer over two router-to-router channels");
    check(n_parallel > 0,  "never several connections at once in a router");
    check(n_contend > 0,   "never two inputs competing for an output");
    check(n_far_first > 0, "interface never chose a farther destination first");
    check(n_stall > 0,     "interface never stalled on a full router buffer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
