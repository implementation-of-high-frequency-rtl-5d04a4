// dds_mux2: two-input multiplexer of the DDS.
//
// y = a when sel is 0, b when sel is 1. The synthesizer uses two of them:
// the first picks the direct (a) or one's-complemented (b) table address under
// the quarter bit of the quantized phase, the second picks the positive (a) or
// two's-complemented (b) table value under the half bit. Combinational.
module dds_mux2 #(
  parameter int unsigned W = dds_pkg::DEF_Q_W - 2
) (
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
