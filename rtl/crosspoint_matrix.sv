// crosspoint_matrix: the cross point matrix between router inputs and outputs.
//
// Built, as in the router it models, from one multiplexer per output: output o
// carries the flit of the input selected by the one-hot row sel[o]. Each
// output's select comes from its own arbiter, so all outputs can carry
// different inputs at the same time. The demultiplexing side (which input
// buffer is popped) is the OR of the grants and lives in the router. The
// AND-OR form of the multiplexer is this design's choice.
//
// Interface: in[NIN] flits, sel[NOUT] one-hot (or zero) rows, out[NOUT].
// Purely combinational; an output with an all-zero row carries zero.
module crosspoint_matrix
  import noc_pkg::*;
#(
  parameter int unsigned NIN  = 8,
  parameter int unsigned NOUT = 8
) (
  input  flit_t          in   [NIN],
  input  logic [NIN-1:0] sel  [NOUT],
  output flit_t          out  [NOUT]
);

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out[o] = '0;
      for (int i = 0; i < NIN; i++) begin
        out[o] = out[o] | (in[i] & {FLIT_W{sel[o][i]}});
      end
    end
  end

endmodule
