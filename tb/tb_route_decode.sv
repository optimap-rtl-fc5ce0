// tb_route_decode: exhaustive test of the XY + local-port decode.
// For a router at (2,1) with four local ports, every 8-bit header is decoded
// (including LIDs the router does not have, which go to local port 0)
// and compared with an independently written XY routing rule.
module tb_route_decode;
  import noc_pkg::*;

  localparam int unsigned NLP = 4, MX = 2, MY = 1;

  flit_t hdr;
  logic [NLP+3:0] port;
  int checks = 0, failures = 0;
  int seen [NLP+4];

  route_decode #(.NLP(NLP), .MY_X(MX), .MY_Y(MY)) dut (.hdr, .port);

  function automatic int expected(int unsigned h);
    int unsigned lid, x, y;
    lid = h / 16;
    x   = (h / 4) % 4;
    y   = h % 4;
    if (x > MX) return 1;      // East
    if (x < MX) return 3;      // West
    if (y > MY) return 2;      // South
    if (y < MY) return 0;      // North
    if (lid >= NLP) return 4;  // missing local port: port 0
    return 4 + lid;            // local port LID
  endfunction

  initial begin
    for (int h = 0; h < 256; h++) begin
      int e;
      hdr = flit_t'(h);
      #1;
      e = expected(h);
      checks++;
      if (port != (NLP+4)'(1) << e) begin
        failures++;
        $display("FAIL: header %02h -> %b, expected port %0d", h, port, e);
      end
      seen[e]++;
    end
    for (int p = 0; p < NLP + 4; p++) begin
      checks++;
      if (seen[p] == 0) begin
        failures++;
        $display("FAIL: port %0d never selected", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
