// tb_reorder_ram: writes random blocks into one bank while reading the other
// bank in reverse order (as RAM1 does for the DCT recursion), and checks every
// word read against a shadow copy.
module tb_reorder_ram;
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  reorder_ram dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] shadow [2][8];
  initial begin
    for (int blk = 0; blk < 20; blk++) begin
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        we = 1; wbank = blk[0]; waddr = 3'(s); wdata = 16'($urandom);
        rbank = ~blk[0]; raddr = 3'(7 - s);
        #1;
        if (blk > 0) begin
          checks++;
          if (rdata !== shadow[rbank][raddr]) begin
            failures++;
            $display("ERROR: bank %0d addr %0d = %h expected %h", rbank, raddr, rdata, shadow[rbank][raddr]);
          end
        end
        @(posedge clk);
        shadow[wbank][waddr] = wdata;
      end
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
