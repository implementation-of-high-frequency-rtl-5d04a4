// dds_twos_comp: two's complement of the table magnitude.
//
// Widens the unsigned MAG_W-bit magnitude to a signed AMP_W-bit value and
// negates it, giving the sample for the negative half of the sine period.
// AMP_W = MAG_W + 1 keeps every negated magnitude representable.
// Combinational.
module dds_twos_comp #(
  parameter int unsigned MAG_W = dds_pkg::DEF_AMP_W - 1,
  parameter int unsigned AMP_W = dds_pkg::DEF_AMP_W
) (
  input  logic [MAG_W-1:0] mag,
  output logic [AMP_W-1:0] neg
);

  always_comb neg = AMP_W'(~{{(AMP_W-MAG_W){1'b0}}, mag} + 1'b1);

endmodule
