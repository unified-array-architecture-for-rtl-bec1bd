// tb_proc_stage: tests the processing stage on its own, closed over a
// behavioural model of the array (array_model, exact rounded T(k)), with the
// same stimulus and checks as the end-to-end test: random blocks in all four
// modes compared with floating-point transforms, latency 33/17 cycles,
// back-to-back blocks, stall-free cosine/sine switches and stalled direction
// changes. With an exact array the errors come only from the processing
// stage's own rounding; bounds 4 (forward) and 16 (inverse) as end to end.
module tb_proc_stage;
  localparam int NBLK_PER_PHASE = 6;
  localparam real PI = 3.14159265358979323846;
  localparam real FWD_TOL = 4.0;
  localparam real INV_TOL = 16.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [1:0] in_mode = 0;
  logic signed [15:0] in_data = 0;
  logic out_valid, out_first, stall;
  logic [1:0] out_mode;
  logic unused_model;
  assign unused_model = t_ready ^ busy;
  logic signed [15:0] out_data;

  logic x_push, array_start, t_shift, t_ready, busy;
  logic signed [11:0] x_in;
  logic signed [15:0] t_out;
  dct_pkg::mode_e om;
  proc_stage dut (.clk, .rst_n, .in_valid, .in_ready, .in_mode(dct_pkg::mode_e'(in_mode)), .in_data,
                  .out_valid, .out_first, .out_mode(om), .out_data, .stall,
                  .x_push, .x_in, .array_start, .t_shift, .t_out);
  array_model u_arr (.clk, .rst_n, .x_push, .x_in, .start(array_start), .t_shift, .t_out, .t_ready, .busy);
  assign out_mode = om;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results queue (one entry per block)
  typedef struct { logic [1:0] m; real v[8]; int t_in; } exp_t;
  exp_t expq[$];
  int n_mode[4] = '{0, 0, 0, 0};
  int n_stall = 0, n_b2b = 0, n_switch_nostall = 0, n_dir_switch = 0;
  real max_err[4] = '{0.0, 0.0, 0.0, 0.0};
  int last_accept = -100;
  logic [1:0] last_mode = 2'b00;
  logic have_last = 0;

  function automatic void reference(input logic [1:0] m, input int d[8], output real r[8]);
    for (int o = 0; o < 8; o++) begin
      real s = 0.0;
      case (m)
        2'b11: for (int n = 0; n < 8; n++) s += d[n] * $cos((2*n+1)*o*PI/16.0);
        2'b10: for (int n = 1; n <= 8; n++) s += d[n-1] * $sin((2*n-1)*(o+1)*PI/16.0);
        2'b01: begin
          s = d[0] / $sqrt(2.0);
          for (int k = 1; k < 8; k++) s += d[k] * $cos((2*o+1)*k*PI/16.0);
        end
        default: begin
          s = d[7] / $sqrt(2.0) * (((o+1) % 2 == 1) ? 1.0 : -1.0);
          for (int k = 1; k < 8; k++) s += d[k-1] * $sin((2*(o+1)-1)*k*PI/16.0);
        end
      endcase
      r[o] = s;
    end
  endfunction

  // called at a falling edge; returns at the falling edge after the last word
  task automatic send_block(input logic [1:0] m, input int kind);
    int d[8];
    exp_t e;
    for (int i = 0; i < 8; i++) begin
      if (m[1]) d[i] = (kind == 1) ? ((i % 2 != 0) ? -256 : 255) : ($urandom_range(0, 511) - 256);
      else      d[i] = (kind == 1) ? ((i % 2 != 0) ? -2047 : 2047) : ($urandom_range(0, 4094) - 2047);
    end
    in_mode  = m;
    in_valid = 1;
    in_data  = 16'(d[0]);
    #1;
    while (!(in_ready && dut.u_ctrl.slot == 3'd0)) begin
      if (stall) n_stall++;
      @(negedge clk);
    end
    // word 0 is taken at the next rising edge
    if (have_last && m == last_mode && cyc - last_accept == 8) n_b2b++;
    if (have_last && m != last_mode && m[1] == last_mode[1] && cyc - last_accept == 8) n_switch_nostall++;
    if (have_last && m[1] != last_mode[1]) n_dir_switch++;
    last_accept = cyc;
    last_mode = m;
    have_last = 1;
    e.m = m;
    e.t_in = cyc;
    reference(m, d, e.v);
    expq.push_back(e);
    n_mode[m]++;
    for (int i = 1; i < 8; i++) begin
      @(negedge clk);
      in_data = 16'(d[i]);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // output checker
  int oidx = 0;
  exp_t cur;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (out_first) begin
        if (expq.size() == 0) begin
          failures++;
          $display("ERROR: unexpected output block");
        end else begin
          cur = expq.pop_front();
          oidx = 0;
          checks++;
          if (cyc - cur.t_in != (cur.m[1] ? 33 : 17)) begin
            failures++;
            $display("ERROR: latency %0d for mode %b", cyc - cur.t_in, cur.m);
          end
          checks++;
          if (out_mode != cur.m) begin
            failures++;
            $display("ERROR: out_mode %b expected %b", out_mode, cur.m);
          end
        end
      end
      if (oidx < 8) begin
        real err;
        err = $itor(out_data) - cur.v[oidx];
        if (err < 0) err = -err;
        if (err > max_err[cur.m]) max_err[cur.m] = err;
        checks++;
        if (err > (cur.m[1] ? FWD_TOL : INV_TOL)) begin
          failures++;
          $display("ERROR: mode %b word %0d got %0d expected %f", cur.m, oidx, out_data, cur.v[oidx]);
        end
      end
      oidx++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(negedge clk);
    // forward phase: FDCT and FDST mixed, back to back
    for (int b = 0; b < NBLK_PER_PHASE; b++) send_block((b % 3 == 2) ? 2'b10 : 2'b11, (b == 0) ? 1 : 0);
    // inverse phase (direction change: stalls)
    for (int b = 0; b < NBLK_PER_PHASE; b++) send_block((b % 3 == 2) ? 2'b00 : 2'b01, (b == 0) ? 1 : 0);
    for (int b = 0; b < NBLK_PER_PHASE; b++) send_block((b % 2 != 0) ? 2'b01 : 2'b00, 0);
    // back to forward
    for (int b = 0; b < NBLK_PER_PHASE; b++) send_block((b % 2 != 0) ? 2'b11 : 2'b10, (b == 1) ? 1 : 0);
    repeat (60) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("ERROR: %0d blocks produced no output", expq.size());
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("ERROR: mode %0d never run", m); end
    end
    checks++; if (n_b2b == 0)  begin failures++; $display("ERROR: no back-to-back blocks"); end
    checks++; if (n_switch_nostall == 0) begin failures++; $display("ERROR: no stall-free mode switch"); end
    checks++; if (n_stall == 0) begin failures++; $display("ERROR: no stall on direction change"); end
    $display("blocks per mode IDST/IDCT/FDST/FDCT: %0d %0d %0d %0d; back-to-back %0d; same-direction switches %0d; direction changes %0d; stall cycles %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_b2b, n_switch_nostall, n_dir_switch, n_stall);
    $display("max abs error IDST/IDCT/FDST/FDCT: %f %f %f %f", max_err[0], max_err[1], max_err[2], max_err[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
