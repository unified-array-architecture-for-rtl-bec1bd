// tb_digit_adder: feeds two sign-extended 12-bit operands digit by digit
// (LSD first, 7 digits) into the digit-serial adder/subtractor and checks the
// reassembled 14-bit result against a+b or a-b.
module tb_digit_adder;
  logic clk = 0, rst_n = 0, first = 0, sub = 0;
  logic [1:0] a = 0, b = 0, s;
  digit_adder dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int x, y, r;
      logic [13:0] wa, wb, res;
      x = (t == 0) ? -2048 : (t == 1) ? 2047 : int'($urandom_range(0, 4095)) - 2048;
      y = (t == 0) ? 2047 : (t == 1) ? -2048 : int'($urandom_range(0, 4095)) - 2048;
      sub = t[0];
      wa = 14'(x); wb = 14'(y);
      for (int d = 0; d < 7; d++) begin
        first = (d == 0);
        a = wa[2*d +: 2]; b = wb[2*d +: 2];
        #1 res[2*d +: 2] = s;
        @(negedge clk);
      end
      r = sub ? x - y : x + y;
      checks++;
      if (int'($signed(res)) != r) begin
        failures++;
        $display("ERROR: %0d %s %0d = %0d, got %0d", x, sub ? "-" : "+", y, r, $signed(res));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
