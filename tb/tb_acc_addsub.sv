// tb_acc_addsub: random sequences of add, subtract, reverse subtract, clear
// and hold, checked against a software model of y and the D register.
module tb_acc_addsub;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, sub = 0, rev = 0;
  logic signed [17:0] a = 0, y, d;
  acc_addsub dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    logic signed [17:0] md, b, ey;
    @(negedge clk); rst_n = 1;
    md = 0;
    for (int t = 0; t < 500; t++) begin
      en = ($urandom_range(0, 3) != 0); clr = ($urandom_range(0, 7) == 0);
      sub = 1'($urandom_range(0, 1)); rev = 1'($urandom_range(0, 1));
      a = 18'(int'($urandom_range(0, 4000)) - 2000);
      b = clr ? 18'sd0 : md;
      ey = !sub ? a + b : (rev ? b - a : a - b);
      #1;
      checks++;
      if (y !== ey) begin failures++; $display("ERROR: y %0d expected %0d", y, ey); end
      @(negedge clk);
      if (en) md = ey;
      checks++;
      if (d !== md) begin failures++; $display("ERROR: D %0d expected %0d", d, md); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
