// tb_dds_freq_reg: self-checking test of the DDS input register.
// Drives random frequency words and checks that each appears on inc exactly
// one rising edge later (not before), and that a synchronous reset clears inc.
module tb_dds_freq_reg;
  localparam int unsigned PW = 32;
  logic          clock = 1'b0;
  logic          reset = 1'b1;
  logic [PW-1:0] fin   = '0;
  logic [PW-1:0] inc;
  logic [PW-1:0] last_word;
  int checks = 0, failures = 0;

  dds_freq_reg dut (.clock, .reset, .fin, .inc);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_inc(input logic [PW-1:0] want, input string what);
    checks++;
    if (inc !== want) begin
      failures++;
      $display("%s: inc=%h expected %h", what, inc, want);
    end
  endtask

  initial begin
    fin = 32'hDEAD_BEEF;
    repeat (2) @(posedge clock);
    #1 expect_inc('0, "reset");
    reset     = 1'b0;
    last_word = '0;
    for (int n = 0; n < 1000; n++) begin
      fin = $urandom();
      #1 expect_inc(last_word, "before edge");
      @(posedge clock);
      #1 expect_inc(fin, "after edge");
      last_word = fin;
    end
    reset = 1'b1;
    @(posedge clock);
    #1 expect_inc('0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
