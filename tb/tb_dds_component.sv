// tb_dds_component: end-to-end self-checking test of the component based DDS
// at its default sizes (32-bit frequency word, 10-bit quantized phase, 12-bit
// signed sample).
//
// A reference model in the testbench tracks the two registers (input register,
// then accumulator) with 64-bit integers and computes each expected sample
// directly from the full-period sine: round(2047 * sin(2*pi*(q + 0.5)/1024))
// with q the top 10 phase bits, rounded half away from zero. sinout is
// compared every clock, which checks the rate of one sample per clock and the
// two-edge latency from fin to the phase step.
//
// The stimulus resembles a frequency-hopping run: reset, a fast tone, a slow
// tone, random hops, a frozen phase (fin = 0), the Nyquist word (2**31), and a
// reset in mid-run. For a 64-samples-per-period tone the number of phase wraps
// and the spacing of rising zero crossings are checked against the period.
// Each mechanism (frequency hop, phase wrap, each of the four quarters,
// mirrored table read, negated half, reset) is counted; one that never
// happens counts as a failure.
module tb_dds_component;
  logic        clock = 1'b0;
  logic        reset = 1'b1;
  logic [31:0] fin   = '0;
  logic [11:0] sinout;

  dds_component dut (.clock, .reset, .fin, .sinout);

  always #5 clock = ~clock;   // 100 MHz

  int checks = 0, failures = 0;
  longint unsigned ref_inc = 0, ref_phase = 0;
  int n_hops = 0, n_wraps = 0, n_resets = 0, n_mirror = 0, n_negated = 0;
  int n_quarter [4] = '{0, 0, 0, 0};
  int cycle = 0;
  int last_rise = -1, rise_gap_errors = 0, rises = 0;
  logic signed [11:0] prev_sample = '0;

  initial begin : watchdog
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_sample(longint unsigned phase);
    longint unsigned q;
    real v;
    q = phase >> 22;
    v = 2047.0 * $sin(2.0 * 3.141592653589793 * (real'(q) + 0.5) / 1024.0);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  // Reference registers, updated on the same edge as the design.
  always @(posedge clock) begin
    longint unsigned s;
    if (reset) begin
      ref_inc   <= 0;
      ref_phase <= 0;
    end else begin
      if (ref_inc != longint'(fin)) n_hops++;
      ref_inc <= longint'(fin);
      s = ref_phase + ref_inc;
      if (s[32]) n_wraps++;
      ref_phase <= s & 64'hFFFF_FFFF;
    end
  end

  // Compare every clock, after the edge has settled.
  always @(negedge clock) begin
    int want;
    int quarter;
    cycle++;
    want    = expected_sample(ref_phase);
    quarter = int'(ref_phase >> 30);
    n_quarter[quarter]++;
    if (quarter == 1 || quarter == 3) n_mirror++;
    if (quarter >= 2) n_negated++;
    checks++;
    if (int'($signed(sinout)) != want) begin
      failures++;
      if (failures < 20)
        $display("cycle %0d phase=%h sinout=%0d expected %0d", cycle, ref_phase[31:0], $signed(sinout), want);
    end
  end

  task automatic run(input logic [31:0] word, input int cycles);
    fin = word;
    repeat (cycles) @(posedge clock);
  endtask

  initial begin
    int wraps_before;
    repeat (3) @(posedge clock);
    @(negedge clock);
    #1 checks++;
    if (int'($signed(sinout)) != expected_sample(0)) begin
      failures++;
      $display("after reset sinout=%0d", $signed(sinout));
    end
    n_resets++;
    @(negedge clock) reset = 1'b0;

    // Fast tone: 64 samples per period. Skip the latency, then count.
    run(32'h0400_0000, 4);
    wraps_before = n_wraps;
    rises = 0; rise_gap_errors = 0; last_rise = -1;
    fork
      begin : rising_zero_crossings
        forever begin
          @(negedge clock);
          #2;
          if (prev_sample < 0 && $signed(sinout) >= 0) begin
            if (last_rise >= 0 && cycle - last_rise != 64) rise_gap_errors++;
            last_rise = cycle;
            rises++;
          end
          prev_sample = $signed(sinout);
        end
      end
    join_none
    run(32'h0400_0000, 640);
    disable rising_zero_crossings;
    checks++;
    if (n_wraps - wraps_before != 10) begin
      failures++;
      $display("64-sample tone: %0d wraps in 640 cycles, expected 10", n_wraps - wraps_before);
    end
    checks++;
    if (rises < 9 || rise_gap_errors != 0) begin
      failures++;
      $display("64-sample tone: %0d rising crossings, %0d with wrong spacing", rises, rise_gap_errors);
    end

    // Slow tone, a few thousand samples per period.
    run(32'h0012_3457, 4000);
    // Random hops.
    for (int h = 0; h < 12; h++) run($urandom(), 100 + ($urandom() % 400));
    // Frozen phase.
    run(32'd0, 50);
    // Nyquist: two samples per period.
    run(32'h8000_0000, 50);
    // Reset in the middle of a tone.
    run(32'h0150_0000, 300);
    reset = 1'b1;
    run(32'h0150_0000, 2);
    n_resets++;
    reset = 1'b0;
    run(32'h0150_0000, 500);
    @(negedge clock);
    #2;

    $display("hops=%0d wraps=%0d resets=%0d mirror=%0d negated=%0d quarters=%0d/%0d/%0d/%0d",
             n_hops, n_wraps, n_resets, n_mirror, n_negated,
             n_quarter[0], n_quarter[1], n_quarter[2], n_quarter[3]);
    checks++; if (n_hops    == 0) begin failures++; $display("no frequency hop"); end
    checks++; if (n_wraps   == 0) begin failures++; $display("no phase wrap"); end
    checks++; if (n_resets  <  2) begin failures++; $display("no mid-run reset"); end
    checks++; if (n_mirror  == 0) begin failures++; $display("no mirrored read"); end
    checks++; if (n_negated == 0) begin failures++; $display("no negated half"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_quarter[k] == 0) begin failures++; $display("quarter %0d never visited", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
