// tb_ps_conv: checks the parallel-to-serial converter. Random 12-bit words are
// loaded; the next 7 digits must be the word's 2-bit digits, least
// significant first, the 7th being two copies of the sign bit. Loads on
// consecutive blocks of 7 cycles, as in the array stage.
module tb_ps_conv;
  logic clk = 0, rst_n = 0, load = 0;
  logic [11:0] din = 0;
  logic [1:0] digit;
  ps_conv dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int b = 0; b < 50; b++) begin
      logic [13:0] w;
      din = (b == 0) ? 12'h800 : (b == 1) ? 12'h7FF : 12'($urandom);
      w = {{2{din[11]}}, din};
      load = 1; @(negedge clk); load = 0;
      for (int d = 0; d < 7; d++) begin
        checks++;
        if (digit !== w[2*d +: 2]) begin
          failures++;
          $display("ERROR: word %h digit %0d = %b expected %b", din, d, digit, w[2*d +: 2]);
        end
        if (d < 6) @(negedge clk);
      end
      // next load right after the 7th digit
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
