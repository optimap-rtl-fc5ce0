// tb_crosspoint_matrix: random test of the cross point matrix.
// Drives random flits and random one-hot (or empty) select rows, and checks
// every output against the selected input, including all outputs taking
// different inputs at the same time.
module tb_crosspoint_matrix;
  import noc_pkg::*;

  localparam int unsigned NIN = 8, NOUT = 8;

  flit_t          in  [NIN];
  logic [NIN-1:0] sel [NOUT];
  flit_t          out [NOUT];
  int checks = 0, failures = 0;
  int choice [NOUT];

  crosspoint_matrix #(.NIN(NIN), .NOUT(NOUT)) dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NIN; i++) in[i] = flit_t'($urandom);
      for (int o = 0; o < NOUT; o++) begin
        // n < 8: a permutation, so all outputs are busy with distinct inputs
        choice[o] = (n < 8) ? (o + n) % NIN : int'($urandom_range(0, NIN));
        sel[o] = (choice[o] == NIN) ? '0 : NIN'(1) << choice[o];
      end
      #1;
      for (int o = 0; o < NOUT; o++) begin
        flit_t exp;
        exp = (choice[o] == NIN) ? '0 : in[choice[o]];
        checks++;
        if (out[o] !== exp) begin
          failures++;
          $display("FAIL: out[%0d]=%02h expected %02h", o, out[o], exp);
        end
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
