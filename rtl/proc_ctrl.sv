// proc_ctrl: block sequencer and control-signal generator of the processing
// stage.
//
// The engine works in frames of N = 8 cycles (`slot` 0..7); one block of eight
// words enters per frame. A block is accepted at slot 0 when in_valid is high
// and in_ready allows it; its eight words then follow in slots 0..7 (in_valid
// must stay high). The mode is sampled with the first word and travels with
// the block through the frame pipeline:
//   forward (FDCT/FDST): IN -> REC -> FEED -> ARR -> POST   (5 frames)
//   inverse (IDCT/IDST): FEED -> ARR -> POST                (3 frames)
// IN writes RAM1 and sums Y(0)/Y(N); REC runs the x(n) recursion into RAM2;
// FEED pushes seven words into the array (forward: from RAM2; inverse: Z(k)
// straight from the multiplier); ARR is the array's digit-serial computation;
// POST turns T(k) into outputs. Forward blocks use the one multiplier in POST
// and inverse blocks in FEED, and both use the C3 and C6 units in different
// frames, so a change of direction (forward <-> inverse) waits until the
// pipeline is empty: `stall` flags a block held back for that reason. Blocks
// of the same direction, with any mix of cosine/sine, stream back to back.
//
// Control outputs (names as in the processing-stage diagram):
//   c1  POST: subtract alpha/delta term (sine modes, odd index)
//   c2  POST: forward, output the Y(0) (FDCT, slot 0) / Y(N) (FDST, slot 7) sum
//   c3  C3 add/sub: subtract (IDCT recursion; alternate FDST terms)
//   c4  POST: inverse, take T(0) from the Z accumulator instead of the array
//   c5  clear the feedback register path (slot 0 of every frame)
//   c6  C6 add/sub: subtract (FDCT recursion)
// The frame pipeline, the stall rule and the exact slot patterns are this
// design's own; c1, c2, c4, c5 and c6 reproduce the published control table,
// c3 is defined differently (see the design notes).
// The reset also disables the assertions (disable iff), so lint tools report
// rst_n as used both asynchronously and synchronously; that use is in the
// checks only, not in the circuit.
module proc_ctrl (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  dct_pkg::mode_e in_mode,
  output logic           in_ready,
  output logic           stall,
  output logic [2:0]     slot,
  output logic           parity,
  // stage activity in the current cycle
  output logic           in_fwd,      // forward block in IN
  output logic           feed_inv,    // inverse block in FEED
  output dct_pkg::mode_e cur_mode,    // mode of the block being input
  output logic           rec_v,
  output dct_pkg::mode_e rec_mode,
  output logic           feed_fwd,
  output logic           arr_v,
  output logic           arr_start,
  output logic           post_v,
  output dct_pkg::mode_e post_mode,
  output logic           frame_end,
  // control signals
  output logic [3:0]     k_post,      // transform index handled in POST
  output logic [3:0]     k_feed,      // transform index of the inverse input
  output logic           feed_extra,  // inverse input slot carrying Y(0)/Y(N)
  output logic           c1, c2, c3, c3_rev, c4, c5, c6
);
  import dct_pkg::*;

  typedef struct packed {
    logic  v;
    mode_e m;
  } tok_t;

  logic [2:0] slot_q;
  logic       parity_q, last_fwd_q;
  tok_t       blk_q, rec_q, feed_q, arr_q, post_q, cur;
  logic       busy, can_accept, accept;

  assign slot      = slot_q;
  assign parity    = parity_q;
  assign frame_end = (slot_q == 3'd7);

  assign busy       = rec_q.v | feed_q.v | arr_q.v | post_q.v;
  assign can_accept = !busy || (last_fwd_q == in_mode[1]);
  assign accept     = (slot_q == 3'd0) && in_valid && can_accept;
  assign stall      = (slot_q == 3'd0) && in_valid && !can_accept;
  assign in_ready   = (slot_q == 3'd0) ? can_accept : blk_q.v;
  assign cur        = (slot_q == 3'd0) ? tok_t'{accept, in_mode} : blk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q     <= '0;
      parity_q   <= 1'b0;
      last_fwd_q <= 1'b0;
      blk_q      <= '0;
      rec_q      <= '0;
      feed_q     <= '0;
      arr_q      <= '0;
      post_q     <= '0;
    end else begin
      slot_q <= slot_q + 3'd1;
      if (accept) last_fwd_q <= in_mode[1];
      if (slot_q == 3'd0) blk_q <= tok_t'{accept, in_mode};
      if (frame_end) begin
        parity_q <= ~parity_q;
        blk_q    <= '0;
        rec_q    <= (cur.v && cur.m[1]) ? cur : '0;
        feed_q   <= rec_q;
        arr_q    <= feed_q.v ? feed_q : ((cur.v && !cur.m[1]) ? cur : '0);
        post_q   <= arr_q;
      end
    end
  end

  assign in_fwd    = cur.v && cur.m[1];
  assign feed_inv  = cur.v && !cur.m[1];
  assign cur_mode  = cur.m;
  assign rec_v     = rec_q.v;
  assign rec_mode  = rec_q.m;
  assign feed_fwd  = feed_q.v;
  assign arr_v     = arr_q.v;
  assign arr_start = arr_q.v && (slot_q == 3'd0);
  assign post_v    = post_q.v;
  assign post_mode = post_q.m;

  always_comb begin
    k_post     = (post_q.m == M_FDST) ? {1'b0, slot_q} + 4'd1 : {1'b0, slot_q};
    k_feed     = (cur.m == M_IDCT) ? {1'b0, slot_q} : {1'b0, slot_q} + 4'd1;
    feed_extra = (cur.m == M_IDCT) ? (slot_q == 3'd0) : (slot_q == 3'd7);
    c1 = post_q.v && !post_q.m[0] && k_post[0];
    c2 = post_q.v && ((post_q.m == M_FDCT && slot_q == 3'd0) ||
                      (post_q.m == M_FDST && slot_q == 3'd7));
    c4 = post_q.v && !post_q.m[1] && (slot_q == 3'd0);
    c5 = (slot_q == 3'd0);
    c6 = rec_q.v && (rec_q.m == M_FDCT);
    // C3 serves POST of inverse blocks, otherwise IN of forward blocks
    if (post_q.v && !post_q.m[1]) begin
      c3     = (post_q.m == M_IDCT);
      c3_rev = 1'b0;
    end else begin
      c3     = in_fwd && (cur.m == M_FDST) && slot_q[0];
      c3_rev = 1'b1;
    end
  end

`ifndef SYNTHESIS
  // once accepted, a block's eight words arrive on consecutive cycles
  a_block_words: assert property (@(posedge clk) disable iff (!rst_n) blk_q.v |-> in_valid)
    else $error("proc_ctrl: in_valid dropped inside a block");
  // a direction change never overlaps blocks already in flight
  a_no_mix: assert property (@(posedge clk) disable iff (!rst_n)
                             !(feed_q.v && cur.v && !cur.m[1]))
    else $error("proc_ctrl: forward and inverse blocks collide in FEED");
`endif
endmodule
