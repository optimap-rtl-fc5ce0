// tb_fig3_mapping: three placements of a four-task diamond task graph on a
// 1x2 mesh of two-local-port routers, run side by side.
// Task graph: task 1 sends to tasks 2 and 3; each of them, once it has
// received its packet, sends to task 4; the run ends when task 4 has both
// packets. Tasks take no time of their own, so the end time is pure
// communication. Placements (left router / right router):
//   (a) 1,4 / 2,3   all four messages cross the router-to-router channel
//   (b) 1,3 / 2,4   two of the four messages stay inside a router
//   (c) 1,2 / 4,3   two of the four messages stay inside a router
// With P = PKT_LEN, every channel crossing costs P cycles, so a message over
// h router-to-router channels takes (h+2)P plus a constant hand-over. Task 1
// sends its two messages back to back, farthest first:
//   (a) 1->2 and 1->3 are both remote: the second arrives after P+3P = 4P;
//       its relay 3->4 is remote again: 4P+3P = 7P in all.
//   (b) 1->2 remote (3P), 1->3 local starting P later (P+2P = 3P); the
//       relays 2->4 (local, 2P) and 3->4 (remote, 3P): 3P+3P = 6P.
//   (c) the mirror image of (b): 6P.
// On top of that come 4 cycles of hand-over: the request is presented one
// cycle after task 1 issues it and taken at the next edge, and each of the
// two deliveries on the critical path adds its one-cycle receive strobe.
// So (a) ends at 4+7P and (b), (c) at 4+6P: (a) costs one whole packet time
// more.
// The test checks these end times, that (a) is the slowest, and that every
// packet reaches the right task.
module tb_fig3_mapping;
  import noc_pkg::*;

  localparam int unsigned PKT_LEN = 8, NC = 4, NMAP = 3;
  // core that runs task t (t = 1..4, index 0 unused); cores 0,1 on the left
  // router, 2,3 on the right one
  localparam int CORE_OF [NMAP][5] = '{
    '{-1, 0, 2, 3, 1},    // (a) left 1,4  right 2,3
    '{-1, 0, 2, 1, 3},    // (b) left 1,3  right 2,4
    '{-1, 0, 1, 3, 2}     // (c) left 1,2  right 4,3
  };

  logic clk = 1'b0, rst_n = 1'b0;
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

  function automatic hdr_t addr(int core);
    hdr_t h;
    h.x = X_W'(core / 2);
    h.y = '0;
    h.lid = LID_W'(core % 2);
    return h;
  endfunction

  longint t0;
  longint done_at [NMAP];

  for (genvar m = 0; m < NMAP; m++) begin : g_map
    logic                tx_valid   [NC];
    logic                tx_ready   [NC];
    hdr_t                tx_hdr     [NC];
    flit_t [PKT_LEN-2:0] tx_payload [NC];
    logic                rx_valid   [NC];
    hdr_t                rx_hdr     [NC];
    flit_t [PKT_LEN-2:0] rx_payload [NC];
    logic [X_W+Y_W-1:0]  tx_dist    [NC];

    noc_mesh #(
      .COLS(2), .ROWS(1), .NCORES(NC), .LP_CNT('{0: 2, 1: 2, default: 0}), .PKT_LEN(PKT_LEN)
    ) dut (.*);

    int q [NC][$];     // pending destination tasks per core
    int got4 = 0;

    function automatic int task_on(int core);
      for (int t = 1; t <= 4; t++) if (CORE_OF[m][t] == core) return t;
      return 0;
    endfunction

    for (genvar c = 0; c < NC; c++) begin : g_core
      initial begin
        tx_valid[c] = 1'b0; tx_hdr[c] = '0; tx_payload[c] = '0;
        wait (rst_n);
        forever begin
          @(posedge clk); #1;
          tx_valid[c] = 1'b0;
          if (q[c].size() != 0) begin
            int d;
            d = q[c].pop_front();
            tx_valid[c] = 1'b1;
            tx_hdr[c] = addr(CORE_OF[m][d]);
            tx_payload[c] = '0;
            tx_payload[c][0] = flit_t'(task_on(c));   // sending task
            tx_payload[c][1] = flit_t'(d);            // receiving task
            #1 while (!tx_ready[c]) begin @(posedge clk); #2; end
            @(posedge clk); #1 tx_valid[c] = 1'b0;
          end
        end
      end

      always @(posedge clk) if (rst_n && rx_valid[c]) begin
        int me;
        me = task_on(c);
        check(int'(rx_payload[c][1]) == me,
              $sformatf("mapping %0d: task %0d got a packet for task %0d", m, me, rx_payload[c][1]));
        if (me == 2 || me == 3) q[c].push_back(4);
        if (me == 4) begin
          got4++;
          if (got4 == 2) done_at[m] = cycle;
        end
      end
    end
  end

  initial begin
    for (int m = 0; m < NMAP; m++) done_at[m] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    t0 = cycle;
    // task 1 issues both of its messages in the same cycle in every mapping
    g_map[0].q[CORE_OF[0][1]].push_back(2); g_map[0].q[CORE_OF[0][1]].push_back(3);
    g_map[1].q[CORE_OF[1][1]].push_back(2); g_map[1].q[CORE_OF[1][1]].push_back(3);
    g_map[2].q[CORE_OF[2][1]].push_back(2); g_map[2].q[CORE_OF[2][1]].push_back(3);
    repeat (20 * PKT_LEN) @(posedge clk);

    $display("end times: (a) %0d  (b) %0d  (c) %0d cycles",
             done_at[0] - t0, done_at[1] - t0, done_at[2] - t0);
    for (int m = 0; m < NMAP; m++) check(done_at[m] > 0, $sformatf("mapping %0d never finished", m));
    check(done_at[0] - t0 == 4 + 7 * PKT_LEN, $sformatf("(a) took %0d", done_at[0] - t0));
    check(done_at[1] - t0 == 4 + 6 * PKT_LEN, $sformatf("(b) took %0d", done_at[1] - t0));
    check(done_at[2] - t0 == 4 + 6 * PKT_LEN, $sformatf("(c) took %0d", done_at[2] - t0));
    check(done_at[0] - done_at[1] == PKT_LEN, "(a) must be one packet time slower than (b)");
    check(done_at[1] == done_at[2], "(b) and (c) must take the same time");
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
