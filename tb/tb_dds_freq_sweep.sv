// tb_dds_freq_sweep: output-frequency test of the component based DDS with a
// 100 MHz clock (10 ns period), at its default sizes.
//
// For a list of target frequencies from 100 kHz to the 50 MHz Nyquist limit,
// the frequency word is fin = round(f * 2**32 / 100 MHz). After the two-edge
// latency the testbench counts rising zero crossings of sinout (a negative
// sample followed by a non-negative one) over a fixed window and compares the
// count with the number of periods f * window, allowing one crossing for the
// window edges. For tones below a quarter of the clock it also checks that
// the largest and smallest samples come as close to +/-2047 as the sampling
// grid allows.
module tb_dds_freq_sweep;
  logic        clock = 1'b0;
  logic        reset = 1'b1;
  logic [31:0] fin   = '0;
  logic [11:0] sinout;
  int checks = 0, failures = 0;

  dds_component dut (.clock, .reset, .fin, .sinout);

  always #5 clock = ~clock;   // 10 ns: 100 MHz

  initial begin : watchdog
    repeat (2000000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real f_hz, input int window);
    real    periods, min_crest;
    int     crossings, peak, trough;
    logic signed [11:0] prev, cur;
    fin = 32'(longint'(f_hz * 4294967296.0 / 100.0e6));   // cast rounds to nearest
    repeat (4) @(posedge clock);
    crossings = 0; peak = -4096; trough = 4096;
    @(negedge clock) prev = $signed(sinout);
    repeat (window) begin
      @(negedge clock);
      cur = $signed(sinout);
      if (prev < 0 && cur >= 0) crossings++;
      if (int'(cur) > peak)   peak   = int'(cur);
      if (int'(cur) < trough) trough = int'(cur);
      prev = cur;
    end
    periods = real'(fin) / 4294967296.0 * real'(window);
    checks++;
    if (real'(crossings) - periods > 1.0 || periods - real'(crossings) > 1.0) begin
      failures++;
      $display("f=%0.0f Hz: %0d rising crossings in %0d cycles, expected %0.2f", f_hz, crossings, window, periods);
    end
    if (f_hz < 25.0e6) begin
      // Some sample lies within half a phase step (pi*f/f_clock) plus one
      // table step of the crest, so it reaches 2047*cos(that angle), less
      // one LSB of rounding.
      min_crest = 2047.0 * $cos(3.141592653589793 * f_hz / 100.0e6 + 2.0 * 3.141592653589793 / 1024.0) - 1.0;
      checks++;
      if (real'(peak) < min_crest || real'(-trough) < min_crest) begin
        failures++;
        $display("f=%0.0f Hz: swing %0d..%0d", f_hz, trough, peak);
      end
    end
    $display("f=%0.0f Hz fin=%h: %0d crossings in %0d cycles (%0.2f periods)", f_hz, fin, crossings, window, periods);
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset = 1'b0;
    measure(100.0e3, 200000);
    measure(1.0e6,   50000);
    measure(3.3e6,   20000);
    measure(10.0e6,  20000);
    measure(25.0e6,  4000);
    measure(40.0e6,  4000);
    measure(50.0e6,  4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
