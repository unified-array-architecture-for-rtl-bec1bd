// tb_addsub_stage: drives six digit streams of random 12-bit words and checks
// the three sum and three difference streams (x(i) +/- x(8-i), reassembled
// over 7 digits) and the x(4) latch.
module tb_addsub_stage;
  logic clk = 0, rst_n = 0, load = 0, first = 0;
  logic [5:0][1:0] dig = '0;
  logic signed [11:0] x4_in = 0, x4;
  logic [2:0][1:0] sum_dig, dif_dig;
  addsub_stage dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int x[8];
      logic [13:0] w[8], rs[3], rd[3];
      int x4v;
      for (int n = 1; n < 8; n++) begin
        x[n] = (t == 0) ? ((n < 4) ? 2047 : -2048) : int'($urandom_range(0, 4095)) - 2048;
        w[n] = 14'(x[n]);
      end
      x4v = x[4];
      x4_in = 12'(x4v); load = 1; @(negedge clk); load = 0; x4_in = 0;
      for (int d = 0; d < 7; d++) begin
        first = (d == 0);
        dig[0] = w[1][2*d +: 2]; dig[1] = w[2][2*d +: 2]; dig[2] = w[3][2*d +: 2];
        dig[3] = w[5][2*d +: 2]; dig[4] = w[6][2*d +: 2]; dig[5] = w[7][2*d +: 2];
        #1;
        for (int i = 0; i < 3; i++) begin rs[i][2*d +: 2] = sum_dig[i]; rd[i][2*d +: 2] = dif_dig[i]; end
        @(negedge clk);
      end
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (int'($signed(rs[i])) != x[i+1] + x[7-i]) begin failures++; $display("ERROR: sum %0d", i); end
        if (int'($signed(rd[i])) != x[i+1] - x[7-i]) begin failures++; $display("ERROR: dif %0d", i); end
      end
      checks++;
      if (int'(x4) != x4v) begin failures++; $display("ERROR: x4 %0d expected %0d", x4, x4v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
