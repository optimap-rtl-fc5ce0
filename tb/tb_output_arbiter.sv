// tb_output_arbiter: self-checking test of one output channel's arbiter.
// Checks that a request is granted in the cycle it appears (no arbitration
// cycle), that the lowest numbered requester wins, that the grant is held for
// exactly PKT_LEN cycles whatever the requests do meanwhile, that nothing is
// granted while the downstream buffer has no room, and that back-to-back
// packets follow without a gap.
module tb_output_arbiter;

  localparam int unsigned NIN = 8, PKT_LEN = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NIN-1:0] req = '0;
  logic dn_ready = 1'b0;
  logic [NIN-1:0] grant, owned;
  logic xfer;
  int checks = 0, failures = 0;

  output_arbiter #(.NIN(NIN), .PKT_LEN(PKT_LEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [NIN-1:0] lowest(logic [NIN-1:0] r);
    for (int i = 0; i < NIN; i++) if (r[i]) return NIN'(1) << i;
    return '0;
  endfunction

  // Offer `r`, expect a grant in the same cycle and a PKT_LEN-cycle hold.
  task automatic packet(logic [NIN-1:0] r);
    logic [NIN-1:0] g;
    req = r;
    dn_ready = 1'b1;
    #1;
    g = lowest(r);
    check(grant == g && xfer, $sformatf("req %b: grant %b expected %b in the same cycle", r, grant, g));
    for (int c = 1; c < PKT_LEN; c++) begin
      @(posedge clk); #1;
      req = NIN'($urandom);    // requests change mid-packet
      dn_ready = 1'($urandom);  // downstream room is only sampled at the start
      #1;
      check(grant == g && owned == g, $sformatf("cycle %0d of packet: grant %b expected %b", c, grant, g));
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // No room downstream: no grant.
    req = 8'b0010_0100; dn_ready = 1'b0;
    #1 check(grant == '0 && !xfer, "grant without downstream room");
    @(posedge clk); #1;

    packet(8'b0010_0100);
    // Back-to-back: a new packet starts in the cycle after the last flit.
    packet(8'b1000_0000);
    for (int n = 0; n < 60; n++) begin
      logic [NIN-1:0] r;
      r = NIN'($urandom);
      if (r == '0) r = 8'b0100_0000;
      packet(r);
    end

    req = '0; dn_ready = 1'b1;
    #1 check(!xfer && grant == '0 && owned == '0, "idle without requests");

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
