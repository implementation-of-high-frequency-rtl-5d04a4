// dds_freq_reg: input register of the component based DDS.
//
// Captures the frequency word fin on every rising clock edge and presents it
// as the phase increment of the accumulator, so the adder sees a stable,
// clock-aligned value even when fin comes from outside the chip. The
// register is the first block of the component chain; a synchronous,
// active-high reset (this design's choice) clears it to zero, which stops
// the accumulator.
//
// Timing: inc(t+1) = fin(t); one cycle of latency.
module dds_freq_reg #(
  parameter int unsigned PHASE_W = dds_pkg::DEF_PHASE_W
) (
  input  logic               clock,
  input  logic               reset,
  input  logic [PHASE_W-1:0] fin,
  output logic [PHASE_W-1:0] inc
);

  always_ff @(posedge clock) begin
    if (reset) inc <= '0;
    else       inc <= fin;
  end

endmodule
