// tb_dds_twos_comp: exhaustive self-checking test of the two's complement
// block: for every 11-bit magnitude m the 12-bit signed output must equal -m.
module tb_dds_twos_comp;
  logic [10:0] mag;
  logic [11:0] neg;
  int checks = 0, failures = 0;

  dds_twos_comp dut (.mag, .neg);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2048; m++) begin
      mag = 11'(m);
      #1;
      checks++;
      if (int'($signed(neg)) != -m) begin failures++; $display("mag=%0d neg=%0d", m, $signed(neg)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
