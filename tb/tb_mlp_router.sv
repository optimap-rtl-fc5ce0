// tb_mlp_router: self-checking test of a four-local-port router.
// The router sits at (1,1) of a 3x3 mesh. The testbench drives all eight
// input links and sinks all eight output links. Every packet carries a unique
// tag in its first two payload flits; a scoreboard checks that it leaves through
// the port that XY routing plus the LID field selects, with its flits intact.
// Directed phases check: the store-and-forward latency (a packet whose first
// flit enters at cycle s leaves at s+PKT_LEN), eight connections running in
// parallel, fixed-priority arbitration between two inputs competing for one
// output, and back pressure from a full downstream buffer. A random phase
// then runs a few hundred packets with random downstream room.
module tb_mlp_router;
  import noc_pkg::*;

  localparam int unsigned NLP = 4, NP = NLP + 4, PKT_LEN = 8;
  localparam int unsigned MX = 1, MY = 1;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid  [NP];
  flit_t in_data   [NP];
  logic  in_ready  [NP];
  logic  out_valid [NP];
  flit_t out_data  [NP];
  logic  out_ready [NP];

  mlp_router #(.NLP(NLP), .MY_X(MX), .MY_Y(MY), .BUF_DEPTH(16), .PKT_LEN(PKT_LEN)) dut (.*);

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

  // Header that makes a router at (1,1) pick output port p.
  function automatic flit_t hdr_for(int p);
    hdr_t h;
    h = '{lid: '0, x: X_W'(MX), y: Y_W'(MY)};
    case (p)
      0: h.y = Y_W'(MY - 1);
      1: h.x = X_W'($urandom_range(2, 3));
      2: h.y = Y_W'($urandom_range(2, 3));
      3: h.x = '0;
      default: h.lid = LID_W'(p - 4);
    endcase
    return flit_t'(h);
  endfunction

  // Expected output from the reference XY rule (independent of hdr_for).
  function automatic int route_ref(flit_t f);
    int x, y, lid;
    lid = f[7:4]; x = f[3:2]; y = f[1:0];
    if (x > MX) return 1;
    if (x < MX) return 3;
    if (y > MY) return 2;
    if (y < MY) return 0;
    return 4 + lid;
  endfunction

  typedef struct {
    flit_t  flits [PKT_LEN];
    int     in_port;
    longint start;     // cycle of the first flit on the input link
  } pkt_t;

  pkt_t   sent [int];  // by tag
  int     tag_ctr = 0;
  pkt_t   tx_q [NP][$];
  longint leave [int]; // tag -> cycle its header left the router
  int     out_of [int];
  int     received = 0;
  int     max_parallel = 0;

  task automatic queue_pkt(int i, int p);
    pkt_t k;
    k.flits[0] = hdr_for(p);
    k.flits[1] = flit_t'(tag_ctr);
    k.flits[2] = flit_t'(tag_ctr >> 8);
    for (int f = 3; f < PKT_LEN; f++) k.flits[f] = flit_t'($urandom);
    k.in_port = i;
    sent[tag_ctr] = k;
    tag_ctr++;
    tx_q[i].push_back(k);
  endtask

  // One sender per input: waits for room, then streams a whole packet.
  for (genvar i = 0; i < NP; i++) begin : g_tx
    initial begin
      in_valid[i] = 1'b0;
      in_data[i]  = '0;
      wait (rst_n);
      forever begin
        @(posedge clk); #1;
        if (tx_q[i].size() != 0 && in_ready[i]) begin
          pkt_t k;
          k = tx_q[i].pop_front();
          sent[int'({k.flits[2], k.flits[1]})].start = cycle;
          for (int f = 0; f < PKT_LEN; f++) begin
            in_valid[i] = 1'b1;
            in_data[i]  = k.flits[f];
            if (f < PKT_LEN - 1) begin @(posedge clk); #1; end
          end
          @(posedge clk); #1;
          in_valid[i] = 1'b0;
        end
      end
    end
  end

  // One sink per output: collects packets and scores them.
  for (genvar o = 0; o < NP; o++) begin : g_rx
    flit_t  buf_f [PKT_LEN];
    int     n = 0;
    longint hdr_cycle;
    always @(posedge clk) begin
      if (rst_n && out_valid[o]) begin
        if (n == 0) hdr_cycle = cycle;
        buf_f[n] = out_data[o];
        n = n + 1;
        if (n == PKT_LEN) begin
          int tag;
          n = 0;
          tag = int'({buf_f[2], buf_f[1]});
          received++;
          if (!sent.exists(tag)) check(0, $sformatf("unknown packet tag %0d at output %0d", tag, o));
          else begin
            bit same = 1;
            for (int f = 0; f < PKT_LEN; f++) if (buf_f[f] != sent[tag].flits[f]) same = 0;
            check(same, $sformatf("packet %0d corrupted", tag));
            check(route_ref(buf_f[0]) == o, $sformatf("packet %0d left on port %0d, expected %0d",
                                                     tag, o, route_ref(buf_f[0])));
            leave[tag]  = hdr_cycle;
            out_of[tag] = o;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    int busy;
    busy = 0;
    for (int o = 0; o < NP; o++) busy += int'(out_valid[o]);
    if (busy > max_parallel) max_parallel = busy;
  end

  task automatic drain(int expect_total);
    int guard = 0;
    while (received < expect_total && guard < 3000) begin
      @(posedge clk); guard++;
    end
    check(received == expect_total, $sformatf("received %0d of %0d packets", received, expect_total));
    repeat (2) @(posedge clk);
  endtask

  initial begin
    for (int o = 0; o < NP; o++) out_ready[o] = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. latency of a lone packet: West input to Local 2
    queue_pkt(3, 6);
    drain(1);
    check(leave[0] - sent[0].start == PKT_LEN,
          $sformatf("store-and-forward latency %0d, expected %0d", leave[0] - sent[0].start, PKT_LEN));

    // 2. eight parallel connections: input i to output (i+1)%8
    max_parallel = 0;
    for (int i = 0; i < NP; i++) queue_pkt(i, (i + 1) % NP);
    drain(1 + NP);
    check(max_parallel == NP, $sformatf("%0d connections in parallel, expected %0d", max_parallel, NP));

    // 3. fixed priority: Local 0 (port 4) and Local 2 (port 6) both to East
    begin
      int ta, tb_;
      ta = tag_ctr;  queue_pkt(6, 1);
      tb_ = tag_ctr; queue_pkt(4, 1);
      drain(3 + NP);
      check(leave[tb_] < leave[ta], "lower-numbered input must win the output");
      check(leave[ta] - leave[tb_] == PKT_LEN,
            $sformatf("loser waited %0d cycles, expected %0d", leave[ta] - leave[tb_], PKT_LEN));
    end

    // 4. back pressure: no room on South for 40 cycles
    begin
      int t;
      longint rel;
      out_ready[2] = 1'b0;
      t = tag_ctr; queue_pkt(0, 2);
      repeat (40) @(posedge clk);
      check(received == 3 + NP, "packet must wait while the downstream buffer is full");
      #1 out_ready[2] = 1'b1;
      rel = cycle;
      drain(4 + NP);
      check(leave[t] == rel, $sformatf("packet left at %0d, room appeared at %0d", leave[t], rel));
    end

    // 5. random traffic with random downstream room
    fork
      begin
        for (int n = 0; n < 300; n++) queue_pkt($urandom_range(0, NP - 1), $urandom_range(0, NP - 1));
      end
      begin
        repeat (1500) begin
          @(posedge clk); #2;
          for (int o = 0; o < NP; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
        end
        for (int o = 0; o < NP; o++) out_ready[o] = 1'b1;
      end
    join_any
    drain(304 + NP);

    $display("max parallel connections %0d", max_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
