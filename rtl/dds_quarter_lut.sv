// dds_quarter_lut: quarter-wave sine table of the DDS.
//
// Holds the rising quarter of a sine period: 2**AW entries, each an unsigned
// MAG_W-bit magnitude, entry i = round((2**MAG_W - 1) * sin((i + 0.5) * pi /
// 2**(AW+1))). Storing a quarter instead of a whole period cuts the table to a
// fourth; the complement blocks and multiplexers around it rebuild the other
// three quarters. The contents are computed at elaboration from that formula
// (dds_pkg::quarter_sine); the sampling grid with its half-step offset is this
// design's choice. Read is combinational, as the synthesizer registers nothing
// after the accumulator.
module dds_quarter_lut #(
  parameter int unsigned AW    = dds_pkg::DEF_Q_W - 2,
  parameter int unsigned MAG_W = dds_pkg::DEF_AMP_W - 1
) (
  input  logic [AW-1:0]    addr,
  output logic [MAG_W-1:0] mag
);

  typedef logic [MAG_W-1:0] table_t [2**AW];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < 2**AW; i++)
      t[i] = MAG_W'(dds_pkg::quarter_sine(i, AW, MAG_W));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb mag = TABLE[addr];

endmodule
