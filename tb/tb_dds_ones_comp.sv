// tb_dds_ones_comp: exhaustive self-checking test of the address one's
// complement: for every 8-bit address a the output must be 255 - a.
module tb_dds_ones_comp;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  dds_ones_comp dut (.a, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (int'(y) != 255 - i) begin failures++; $display("a=%0d y=%0d", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
