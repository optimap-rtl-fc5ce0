// tb_channel_buffer: self-checking test of the store-and-forward buffer.
// Writes whole packets of random flits, checks that a packet is offered
// (pkt_avail) only after its last flit is stored and exactly one cycle later,
// that in_ready reports room for a whole packet, and that the flits come out
// in order. A reference queue gives the expected data.
module tb_channel_buffer;
  import noc_pkg::*;

  localparam int unsigned DEPTH   = 16;
  localparam int unsigned PKT_LEN = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, rd_en = 1'b0;
  flit_t in_data = '0;
  logic  in_ready, pkt_avail;
  flit_t head;

  int checks = 0, failures = 0;
  flit_t ref_q[$];

  channel_buffer #(.DEPTH(DEPTH), .PKT_LEN(PKT_LEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_packet();
    for (int f = 0; f < PKT_LEN; f++) begin
      in_valid = 1'b1;
      in_data  = flit_t'($urandom);
      ref_q.push_back(in_data);
      @(posedge clk); #1;
      if (f < PKT_LEN - 1)
        check(pkt_avail == 1'b0 || ref_q.size() > PKT_LEN, "packet offered before it is complete");
    end
    in_valid = 1'b0;
    check(pkt_avail == 1'b1, "complete packet not offered the cycle after its last flit");
  endtask

  task automatic read_packet();
    for (int f = 0; f < PKT_LEN; f++) begin
      flit_t exp;
      exp = ref_q.pop_front();
      check(head == exp, $sformatf("flit %0d: got %02h expected %02h", f, head, exp));
      rd_en = 1'b1;
      @(posedge clk); #1;
    end
    rd_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(in_ready == 1'b1 && pkt_avail == 1'b0, "empty buffer after reset");

    // One packet in, out.
    write_packet();
    check(in_ready == 1'b1, "room for a second packet");
    read_packet();
    check(pkt_avail == 1'b0, "buffer empty after reading the packet");

    // Two packets fill the buffer: no room for a third.
    write_packet();
    write_packet();
    check(in_ready == 1'b0, "in_ready must drop when no packet fits");
    read_packet();
    check(in_ready == 1'b1 && pkt_avail == 1'b1, "room again, second packet still offered");
    read_packet();
    check(pkt_avail == 1'b0, "empty after two packets");

    // Many random rounds with reads overlapping writes.
    for (int n = 0; n < 20; n++) begin
      write_packet();
      read_packet();
    end
    check(ref_q.size() == 0, "all flits read back");

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
