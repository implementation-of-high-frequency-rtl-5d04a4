// tb_dds_quarter_lut: exhaustive self-checking test of the quarter sine table.
// Each of the 256 entries is compared with 2047 * sin(2*pi*(i + 0.5)/1024),
// rounded to nearest, i.e. the sine of the centre of phase step i of a
// 1024-step period. Also checks that the table rises monotonically and that
// the largest entry stays below full scale.
module tb_dds_quarter_lut;
  logic [7:0]  addr;
  logic [10:0] mag;
  int checks = 0, failures = 0;
  int prev = -1;

  dds_quarter_lut dut (.addr, .mag);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int want;
      want = int'($floor(2047.0 * $sin(2.0 * 3.141592653589793 * (real'(i) + 0.5) / 1024.0) + 0.5));
      addr = 8'(i);
      #1;
      checks++;
      if (int'(mag) != want) begin failures++; $display("entry %0d = %0d expected %0d", i, mag, want); end
      checks++;
      if (int'(mag) < prev) begin failures++; $display("entry %0d below its predecessor", i); end
      prev = int'(mag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
