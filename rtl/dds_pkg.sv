// dds_pkg: constants and the quarter-sine table formula shared by the
// component based direct digital synthesizer (DDS).
//
// The default widths are this design's choice; the only size tied to the
// published resource count is the 32-bit phase (two 32-bit registers account
// for the 64 flip-flops reported for the component based DDS). The quantized
// phase is DEF_Q_W bits: its top bit picks the sign half, the next bit picks
// the mirrored quarter, and the remaining DEF_Q_W-2 bits address a table that
// holds only the first quarter of a sine period.
package dds_pkg;

  localparam int unsigned DEF_PHASE_W = 32;  // accumulator and frequency word
  localparam int unsigned DEF_Q_W     = 10;  // quantizer output bits
  localparam int unsigned DEF_AMP_W   = 12;  // signed output sample bits

  localparam real PI = 3.14159265358979323846;

  // Entry i of a quarter-sine table with 2**aw entries and mw-bit unsigned
  // magnitude: round((2**mw - 1) * sin((i + 0.5) * pi / 2**(aw+1))).
  // The half-step offset places the samples symmetrically inside the quarter,
  // so entry (2**aw - 1 - i), reached by the one's complement of i, is the
  // mirror image of entry i about pi/2.
  function automatic int unsigned quarter_sine(int unsigned i, int unsigned aw, int unsigned mw);
    real x;
    x = $sin((real'(i) + 0.5) * PI / real'(2 ** (aw + 1))) * real'((2 ** mw) - 1);
    return int'($rtoi(x + 0.5));
  endfunction

endpackage
