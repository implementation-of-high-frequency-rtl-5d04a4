// tb_dds_mux2: self-checking test of the two-input multiplexer, at the two
// widths the synthesizer uses (8-bit address and 12-bit sample), with random
// data and both select values.
module tb_dds_mux2;
  logic        sel;
  logic [7:0]  a8, b8, y8;
  logic [11:0] a12, b12, y12;
  int checks = 0, failures = 0;

  dds_mux2 #(.W(8))  dut8  (.sel, .a(a8),  .b(b8),  .y(y8));
  dds_mux2 #(.W(12)) dut12 (.sel, .a(a12), .b(b12), .y(y12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sel = 1'($urandom());
      a8  = 8'($urandom());  b8  = 8'($urandom());
      a12 = 12'($urandom()); b12 = 12'($urandom());
      #1;
      checks++;
      if (y8 !== (sel ? b8 : a8) || y12 !== (sel ? b12 : a12)) begin
        failures++;
        $display("sel=%b y8=%h y12=%h", sel, y8, y12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
