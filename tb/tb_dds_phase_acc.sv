// tb_dds_phase_acc: self-checking test of the phase accumulator.
// A 64-bit reference accumulator in the testbench predicts the phase and the
// wrap flag (carry out of bit 31) after every edge, for random increments,
// increments held for many cycles, and the extreme increments 0, 1 and
// 2**32-1. Reset must clear both outputs.
module tb_dds_phase_acc;
  localparam int unsigned PW = 32;
  logic          clock = 1'b0;
  logic          reset = 1'b1;
  logic [PW-1:0] inc   = '0;
  logic [PW-1:0] phase;
  logic          wrap;
  longint unsigned ref_phase;
  logic            ref_wrap;
  int checks = 0, failures = 0, wraps = 0;

  dds_phase_acc dut (.clock, .reset, .inc, .phase, .wrap);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [PW-1:0] next_inc);
    longint unsigned s;
    inc = next_inc;
    @(posedge clock);
    s         = ref_phase + longint'(inc);
    ref_wrap  = s[32];
    ref_phase = s & 64'hFFFF_FFFF;
    #1;
    checks++;
    if (phase !== ref_phase[PW-1:0] || wrap !== ref_wrap) begin
      failures++;
      $display("inc=%h phase=%h wrap=%b expected %h %b", inc, phase, wrap, ref_phase[PW-1:0], ref_wrap);
    end
    if (wrap) wraps++;
  endtask

  initial begin
    inc = 32'h1234_5678;
    repeat (2) @(posedge clock);
    #1 checks++;
    if (phase !== '0 || wrap !== 1'b0) begin failures++; $display("reset failed"); end
    reset     = 1'b0;
    ref_phase = 0;
    ref_wrap  = 1'b0;
    for (int n = 0; n < 2000; n++) step($urandom());
    for (int n = 0; n < 300;  n++) step(32'h0100_0000);   // 256 steps per period
    for (int n = 0; n < 10;   n++) step(32'd0);           // frozen phase
    for (int n = 0; n < 10;   n++) step(32'd1);
    for (int n = 0; n < 10;   n++) step(32'hFFFF_FFFF);   // steps backwards by 1
    checks++;
    if (wraps < 100) begin failures++; $display("only %0d wraps seen", wraps); end
    reset = 1'b1;
    @(posedge clock);
    #1 checks++;
    if (phase !== '0 || wrap !== 1'b0) begin failures++; $display("second reset failed"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
