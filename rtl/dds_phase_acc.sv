// dds_phase_acc: phase accumulator (adder plus register with feedback).
//
// Every rising clock edge the register takes its own value plus the phase
// increment, modulo 2**PHASE_W. The phase therefore advances by inc/2**PHASE_W
// of a period per clock, so the synthesized frequency is
// f_out = inc * f_clock / 2**PHASE_W. Dropping the adder's carry is what makes
// the phase wrap once per output period.
//
// wrap is this design's addition for observation: it is high for the cycle
// after an addition that overflowed, i.e. while phase holds the first value of
// a new period. Reset is synchronous and active high (this design's choice)
// and clears phase and wrap.
//
// Timing: phase(t+1) = phase(t) + inc(t) mod 2**PHASE_W.
module dds_phase_acc #(
  parameter int unsigned PHASE_W = dds_pkg::DEF_PHASE_W
) (
  input  logic               clock,
  input  logic               reset,
  input  logic [PHASE_W-1:0] inc,
  output logic [PHASE_W-1:0] phase,
  output logic               wrap
);

  logic [PHASE_W:0] sum;

  always_comb sum = {1'b0, phase} + {1'b0, inc};

  always_ff @(posedge clock) begin
    if (reset) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      phase <= sum[PHASE_W-1:0];
      wrap  <= sum[PHASE_W];
    end
  end

endmodule
