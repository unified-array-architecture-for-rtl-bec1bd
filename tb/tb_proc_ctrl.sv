// tb_proc_ctrl: checks the block sequencer and control signals.
// For a sequence of blocks in all modes it checks that each block reaches the
// POST frame 4 frames (forward) or 2 frames (inverse) after it was accepted,
// that the control signals over the eight slots of the relevant frame follow
// the table below (slot 0 first), that blocks of one direction are accepted
// in consecutive frames, and that a direction change is held back (stall)
// until the pipeline is empty, i.e. 5 frames after a forward block or 3
// frames after an inverse block.
//            POST c1   POST c2   POST c4   c5        c3 (IN/POST)  c6 (REC)
//   FDCT     00000000  10000000  00000000  10000000  00000000      11111111
//   FDST     10101010  00000001  00000000  10000000  01010101      00000000
//   IDCT     00000000  00000000  10000000  10000000  11111111      -
//   IDST     01010101  00000000  10000000  10000000  00000000      -
module tb_proc_ctrl;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  mode_e in_mode = M_FDCT;
  logic in_ready, stall, parity, in_fwd, feed_inv, rec_v, feed_fwd, arr_v, arr_start, post_v, frame_end;
  logic [2:0] slot;
  mode_e cur_mode, rec_mode, post_mode;
  logic [3:0] k_post, k_feed;
  logic feed_extra, c1, c2, c3, c3_rev, c4, c5, c6;
  proc_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int frame = 0;
  always @(posedge clk) if (rst_n && frame_end) frame <= frame + 1;

  typedef struct { mode_e m; int f; } acc_t;
  acc_t accq[$];
  int n_stall = 0;

  function automatic logic [7:0] pat(input string which, input mode_e m);
    case (which)
      "c1": return (m == M_FDST) ? 8'b10101010 : (m == M_IDST) ? 8'b01010101 : 8'h00;
      "c2": return (m == M_FDCT) ? 8'b10000000 : (m == M_FDST) ? 8'b00000001 : 8'h00;
      "c4": return m[1] ? 8'h00 : 8'b10000000;
      "c3": return (m == M_FDST) ? 8'b01010101 : (m == M_IDCT) ? 8'hFF : 8'h00;
      default: return (m == M_FDCT) ? 8'hFF : 8'h00;   // c6
    endcase
  endfunction

  // capture the control patterns of each frame (bit 7 = slot 0)
  logic [7:0] p1, p2, p3, p4, p5, p6, p3in;
  mode_e in_m_f;
  logic in_fwd_f;
  always @(negedge clk) if (rst_n) begin
    p1[7-slot] = c1; p2[7-slot] = c2; p4[7-slot] = c4; p5[7-slot] = c5; p6[7-slot] = c6;
    p3[7-slot] = c3;
    if (slot == 0) begin in_m_f = cur_mode; in_fwd_f = in_fwd; end
    if (slot == 7) begin
      if (post_v) begin
        acc_t e;
        checks++;
        if (accq.size() == 0) begin failures++; $display("ERROR: POST without block"); end
        else begin
          e = accq.pop_front();
          if (e.m != post_mode || frame != e.f + (e.m[1] ? 4 : 2)) begin
            failures++;
            $display("ERROR: block mode %0d accepted frame %0d in POST at frame %0d", e.m, e.f, frame);
          end
        end
        checks += 3;
        if (p1 != pat("c1", post_mode)) begin failures++; $display("ERROR: c1 %b mode %0d", p1, post_mode); end
        if (p2 != pat("c2", post_mode)) begin failures++; $display("ERROR: c2 %b mode %0d", p2, post_mode); end
        if (p4 != pat("c4", post_mode)) begin failures++; $display("ERROR: c4 %b mode %0d", p4, post_mode); end
        if (!post_mode[1]) begin
          checks++;
          if (p3 != pat("c3", post_mode)) begin failures++; $display("ERROR: c3 %b mode %0d", p3, post_mode); end
        end
      end
      if (in_fwd_f && !(post_v && !post_mode[1])) begin
        checks++;
        if (p3 != pat("c3", in_m_f)) begin failures++; $display("ERROR: c3 (IN) %b mode %0d", p3, in_m_f); end
      end
      if (rec_v) begin
        checks++;
        if (p6 != pat("c6", rec_mode)) begin failures++; $display("ERROR: c6 %b mode %0d", p6, rec_mode); end
      end
      checks++;
      if (p5 != 8'b10000000) begin failures++; $display("ERROR: c5 %b", p5); end
    end
  end

  int last_f = -10;
  mode_e last_m = M_FDCT;
  task automatic send(input mode_e m);
    in_mode = m; in_valid = 1;
    #1;
    while (!(slot == 0 && in_ready)) begin
      if (slot == 0 && stall) n_stall++;
      @(negedge clk); #1;
    end
    checks++;
    if (last_f >= 0) begin
      int gap;
      gap = (m[1] == last_m[1]) ? 1 : (last_m[1] ? 5 : 3);
      if (frame - last_f != gap) begin
        failures++;
        $display("ERROR: mode %0d accepted %0d frames after mode %0d, expected %0d", m, frame - last_f, last_m, gap);
      end
    end
    accq.push_back('{m, frame});
    last_f = frame; last_m = m;
    repeat (8) @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    static mode_e seq[] = '{M_FDCT, M_FDST, M_FDCT, M_IDCT, M_IDST, M_IDST, M_FDST, M_IDCT, M_FDCT, M_FDCT};
    @(negedge clk); rst_n = 1; @(negedge clk);
    foreach (seq[i]) send(seq[i]);
    repeat (60) @(negedge clk);
    checks += 2;
    if (accq.size() != 0) begin failures++; $display("ERROR: %0d blocks lost", accq.size()); end
    if (n_stall == 0) begin failures++; $display("ERROR: no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
