// tb_da_pe: drives one PE per odd and even k with the digits of three random
// 14-bit operands (7 steps, LSD first, `last` on the sign digit) and a random
// B, and checks T(k) = sum_i v_i * round(1024 cos(i k pi/8)) / 1024 + B
// within the truncation of the shift-right accumulation (-2 < error <= 1).
module tb_da_pe;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, last = 0;
  logic [5:0] a = 0;
  logic signed [15:0] b = 0;
  logic signed [15:0] t3, t6;
  da_pe #(.K(3)) dut3 (.clk, .rst_n, .clear, .en, .last, .a, .b, .t(t3));
  da_pe #(.K(6)) dut6 (.clk, .rst_n, .clear, .en, .last, .a, .b, .t(t6));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input int k, input logic signed [15:0] t, input int v[3], input int bb);
    longint tot;
    real e;
    tot = 0;
    for (int i = 0; i < 3; i++) tot += longint'(v[i]) * dct_pkg::da_cos((i+1)*k);
    e = $itor(tot) / 1024.0 + bb;
    checks++;
    if (!($itor(t) > e - 2.0 && $itor(t) <= e + 1.0)) begin
      failures++;
      $display("ERROR: k=%0d T=%0d expected %f", k, t, e);
    end
  endtask
  initial begin
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      int v[3], bb;
      logic [13:0] w[3];
      for (int i = 0; i < 3; i++) begin
        v[i] = (r == 0) ? 4094 : (r == 1) ? -4096 : int'($urandom_range(0, 8190)) - 4096;
        w[i] = 14'(v[i]);
      end
      bb = int'($urandom_range(0, 4095)) - 2048;
      b = 16'(bb);
      for (int d = 0; d < 7; d++) begin
        en = 1; clear = (d == 0); last = (d == 6);
        a = {w[2][2*d +: 2], w[1][2*d +: 2], w[0][2*d +: 2]};
        if (d == 6) begin
          #1;
          check(3, t3, v, bb);
          check(6, t6, v, bb);
        end
        @(negedge clk);
      end
      en = 0; last = 0;
      if (r % 7 == 3) @(negedge clk);   // idle gap: accumulator must hold
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
