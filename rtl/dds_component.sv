// dds_component: component based direct digital frequency synthesizer.
//
// Produces one signed sine sample per clock at the frequency
//   f_out = fin * f_clock / 2**PHASE_W.
// The chain, each stage its own module, is:
//   fin -> input register -> phase accumulator -> quantizer
//       -> one's complement / address mux -> quarter sine table
//       -> two's complement / sign mux -> sinout
// The quantizer keeps the top Q_W phase bits. Its top bit (half) and next bit
// (quarter) steer the two multiplexers: in the second and fourth quarters the
// table address is complemented so the quarter table is read backwards, and
// in the second half the table value is negated. The table therefore needs
// only 2**(Q_W-2) entries for a full period of 2**Q_W phase steps.
//
// Order of the stages, the quarter table with its two complement blocks and
// multiplexers, and the port names follow the published component based
// design. Widths, the synchronous active-high reset, the table's sampling grid
// and the bit that steers each multiplexer are this design's choices.
//
// Timing: fin is registered (one edge), the accumulator adds the registered
// increment on the next edge, and sinout is combinational from the
// accumulator register. A new fin therefore first changes the phase step on
// the second rising edge after it is applied. Reset (synchronous) zeroes both
// registers, so sinout then reads the sample at phase 0.
module dds_component #(
  parameter int unsigned PHASE_W = dds_pkg::DEF_PHASE_W,
  parameter int unsigned Q_W     = dds_pkg::DEF_Q_W,
  parameter int unsigned AMP_W   = dds_pkg::DEF_AMP_W
) (
  input  logic               clock,
  input  logic               reset,
  input  logic [PHASE_W-1:0] fin,
  output logic [AMP_W-1:0]   sinout
);

  localparam int unsigned LUT_AW = Q_W - 2;
  localparam int unsigned MAG_W  = AMP_W - 1;

  logic [PHASE_W-1:0] inc;
  logic [PHASE_W-1:0] phase;
  logic               wrap;
  logic               half;
  logic               quarter;
  logic [LUT_AW-1:0]  addr;
  logic [LUT_AW-1:0]  addr_inv;
  logic [LUT_AW-1:0]  lut_addr;
  logic [MAG_W-1:0]   mag;
  logic [AMP_W-1:0]   mag_neg;

  dds_freq_reg #(.PHASE_W(PHASE_W)) u_freq_reg (
    .clock, .reset, .fin, .inc
  );

  dds_phase_acc #(.PHASE_W(PHASE_W)) u_phase_acc (
    .clock, .reset, .inc, .phase, .wrap
  );

  // Quantizer: a slicer that keeps the top Q_W phase bits (truncation, no
  // rounding or dither) and names its fields. It is wiring only; the
  // PHASE_W-Q_W low phase bits only carry the fine phase inside the
  // accumulator and are deliberately not read here.
  always_comb begin
    {half, quarter, addr} = phase[PHASE_W-1 -: Q_W];
  end

  dds_ones_comp #(.W(LUT_AW)) u_ones_comp (
    .a(addr), .y(addr_inv)
  );

  dds_mux2 #(.W(LUT_AW)) u_addr_mux (
    .sel(quarter), .a(addr), .b(addr_inv), .y(lut_addr)
  );

  dds_quarter_lut #(.AW(LUT_AW), .MAG_W(MAG_W)) u_lut (
    .addr(lut_addr), .mag
  );

  dds_twos_comp #(.MAG_W(MAG_W), .AMP_W(AMP_W)) u_twos_comp (
    .mag, .neg(mag_neg)
  );

  dds_mux2 #(.W(AMP_W)) u_sign_mux (
    .sel(half), .a({1'b0, mag}), .b(mag_neg), .y(sinout)
  );

  // wrap only marks period starts for observation; it drives no logic here.
  logic unused_wrap;
  always_comb unused_wrap = wrap;

endmodule
