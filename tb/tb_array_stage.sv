// tb_array_stage: self-checking test of the DA array stage.
//
// Pushes blocks of seven random 12-bit words (plus corner cases at full
// scale) into the X chain, starts the array, and reads T(1..7) back from the
// T chain. Each T(k) is compared with the exact inner product
//   sum_{n=1..7} x(n) * c(n,k) / 1024,  c(n,k) = round(1024 cos(n k pi/8))
// (the coefficients the ROMs are built from), allowing the truncation of the
// shift-right accumulation: expected - 2 < T(k) <= expected + 1.
// Also checks that T(1..7) are ready exactly NDIG (=7) cycles after start,
// and runs blocks back to back every 8 cycles with the next block being
// pushed while the current one is computed.
module tb_array_stage;
  logic clk = 0, rst_n = 0;
  logic x_push = 0, start = 0, t_shift = 0;
  logic signed [11:0] x_in = 0;
  logic signed [15:0] t_out;
  logic t_ready, busy;

  array_stage dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int blk[2][8];

  function automatic int cq(input int j);
    return dct_pkg::da_cos(j);
  endfunction

  task automatic fill(input int b, input int kind);
    for (int n = 1; n <= 7; n++) begin
      case (kind)
        0: blk[b][n] = $urandom_range(0, 4095) - 2048;
        1: blk[b][n] = 2047;
        2: blk[b][n] = -2048;
        default: blk[b][n] = (n % 2 != 0) ? 2047 : -2048;
      endcase
    end
  endtask

  task automatic check_block(input int b);
    for (int k = 1; k <= 7; k++) begin
      longint tot;
      real e;
      tot = 0;
      for (int n = 1; n <= 7; n++) tot += longint'(blk[b][n]) * cq(n*k);
      e = $itor(tot) / 1024.0;
      checks++;
      if (!($itor(t_out) > e - 2.0 && $itor(t_out) <= e + 1.0)) begin
        failures++;
        $display("ERROR: T(%0d) = %0d, expected %f", k, t_out, e);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int nb;
    int start_cyc;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    nb = 12;
    // prime: push block 0
    fill(0, 1);
    for (int n = 1; n <= 7; n++) begin x_in = 12'(blk[0][n]); x_push = 1; @(negedge clk); end
    x_push = 0;
    @(negedge clk);
    for (int i = 0; i < nb; i++) begin
      int cb, nbk;
      cb = i % 2; nbk = 1 - cb;
      // start block cb; push next block during its digit steps
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      fill(nbk, (i < 3) ? i + 2 : 0);
      for (int n = 1; n <= 7; n++) begin
        x_in = 12'(blk[nbk][n]); x_push = 1;
        if (t_ready) begin failures++; $display("ERROR: early t_ready"); end
        @(negedge clk); cyc++;
      end
      x_push = 0;
      // t_ready must appear now (7 digit steps after start)
      checks++;
      if (!t_ready) begin failures++; $display("ERROR: t_ready not %0d cycles after start", cyc); end

      // read T(1..7) while shifting; the next start comes at the 8th cycle
      fork
        begin
          t_shift = 1;
          check_block(cb);
          t_shift = 0;
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
