// dds_ones_comp: one's complement of the quarter-table address.
//
// Inverting every address bit turns address i into 2**W - 1 - i, so the table
// is read from its end back to its start. In the second and fourth quarters of
// a period this yields the falling half of each sine lobe from a table that
// stores only the rising quarter. Combinational.
module dds_ones_comp #(
  parameter int unsigned W = dds_pkg::DEF_Q_W - 2
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  always_comb y = ~a;

endmodule
