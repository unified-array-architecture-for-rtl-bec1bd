// proc_stage: pre- and post-processing around the DA array.
//
// The array evaluates T(k) = sum_{n=1..7} v(n) cos(n*k*pi/8). This stage turns
// each transform into that kernel and back (constants sqrt(2/N) neglected):
//
//  FDCT  in: y(0..7)   x(7)=y(7), x(n)=y(n)-x(n+1)          v = x(1..7)
//        out: Y(0) = sum y(n);  Y(k) = [2T(k) + x(0)] cos(k*pi/16), k=1..7
//  FDST  in: y(1..8)   x(1)=y(1), x(n)=y(n)+x(n-1)          v = x(1..7)
//        out: Y(k) = -[2T(k) + (-1)^k x(8)] sin(k*pi/16), k=1..7;
//             Y(8) = sum (-1)^(n+1) y(n)
//  IDCT  in: Y(0..7)   v = Z(k) = Y(k) cos(k*pi/16)
//        t(n) = 2T(n) + sqrt(2) Y(0), T(0) = sum Z(k);
//        out: y(0) = t(0)/2,  y(n) = t(n) - y(n-1), n=1..7
//  IDST  in: Y(1..8)   v = Z(k) = Y(k) sin(k*pi/16)
//        t(n) = 2T(n) + (-1)^n sqrt(2) Y(8), T(0) = sum Z(k);
//        out: y(1) = t(0)/2,  y(n+1) = t(n) + y(n), n=1..7
//
// Units (as in the processing-stage diagram): RAM1 (input reorder), the C6
// add/sub with D (x recursion; Z accumulation for T(0)), RAM2 (x reorder),
// the multiplier with cos/sin/inv/sqrt(2) coefficients (beta(k) in forward,
// Z(k) and sqrt(2)*delta in inverse), the C1 add/sub (2T +/- alpha), and the
// C3 add/sub with D (Y(0)/Y(N) sums in forward; y recursion in inverse).
// Sequencing and control signals come from proc_ctrl.
//
// Interface: blocks of eight D_W-bit words, one per cycle, on in_* (see
// proc_ctrl for the handshake); results as eight consecutive out_valid words,
// out_first on the first, in the index order listed above. Latency from the
// first input word to the first output word: 4 frames + 1 cycle (33 cycles)
// forward, 2 frames + 1 cycle (17 cycles) inverse. The array side is x_push /
// x_in / array_start / t_shift / t_out of array_stage.
// Number formats (integer samples, 16-bit datapath, rounding of the products)
// are this design's choices. Forward inputs are meant to be 9-bit values and
// inverse inputs 12-bit values so that every x(n) and Z(k) fits the 12-bit
// array words.
module proc_stage #(
  parameter int D_W = 16,
  parameter int X_W = 12,
  parameter int T_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  dct_pkg::mode_e        in_mode,
  input  logic signed [D_W-1:0] in_data,
  output logic                  out_valid,
  output logic                  out_first,
  output dct_pkg::mode_e        out_mode,
  output logic signed [D_W-1:0] out_data,
  output logic                  stall,
  // to/from the array stage
  output logic                  x_push,
  output logic signed [X_W-1:0] x_in,
  output logic                  array_start,
  output logic                  t_shift,
  input  logic signed [T_W-1:0] t_out
);
  import dct_pkg::*;
  localparam int W = D_W + 2;     // internal width of sums and recursions

  // ---------------- control ----------------
  logic [2:0] slot;
  logic       parity, in_fwd, feed_inv, rec_v, feed_fwd, arr_v, post_v, frame_end;
  mode_e      cur_mode, rec_mode, post_mode;
  logic [3:0] k_post, k_feed;
  logic       feed_extra, c1, c2, c3, c3_rev, c4, c5, c6;

  proc_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_mode, .in_ready, .stall, .slot, .parity,
    .in_fwd, .feed_inv, .cur_mode, .rec_v, .rec_mode, .feed_fwd, .arr_v,
    .arr_start(array_start), .post_v, .post_mode, .frame_end,
    .k_post, .k_feed, .feed_extra, .c1, .c2, .c3, .c3_rev, .c4, .c5, .c6);

  // per-block values travelling with the frame pipeline
  typedef struct packed {
    logic signed [W-1:0] ysum;   // Y(0) / Y(N) (forward)
    logic signed [W-1:0] alpha;  // x(0) / x(N) (forward) or sqrt(2)*Y(0) / sqrt(2)*Y(N) (inverse)
    logic signed [W-1:0] t0;     // T(0) = sum Z(k) (inverse)
  } bdata_t;
  bdata_t d_rec, d_feed, d_arr, d_post;

  logic signed [W-1:0] in_w;
  assign in_w = W'(in_data);

  // ---------------- RAM1: input block, read back in recursion order -------
  logic [2:0]          r1_raddr;
  logic signed [W-1:0] r1_rdata;
  assign r1_raddr = (rec_mode == M_FDCT) ? 3'd7 - slot : slot;
  reorder_ram #(.W(W), .DEPTH(N)) u_ram1 (
    .clk, .we(in_fwd), .wbank(parity), .waddr(slot), .wdata(in_w),
    .rbank(~parity), .raddr(r1_raddr), .rdata(r1_rdata));

  // ---------------- multiplier (shared: inverse FEED / forward POST) -------
  logic signed [W-1:0]   c1sum;
  logic signed [D_W-1:0] mul_y;
  logic                  mul_post;
  assign mul_post = post_v && post_mode[1];
  coef_mul #(.A_W(W), .Y_W(D_W)) u_mul (
    .a   (mul_post ? c1sum : in_w),
    .k   (mul_post ? k_post : k_feed),
    .mode(mul_post ? post_mode : cur_mode),
    .y   (mul_y));

  // ---------------- C6 add/sub with D: x recursion or T(0) sum ------------
  logic signed [W-1:0] c6_a, c6_y, c6_d;
  logic                c6_en;
  always_comb begin
    if (rec_v) begin
      c6_a  = r1_rdata;
      c6_en = 1'b1;
    end else begin
      c6_a  = (feed_inv && !feed_extra) ? W'(mul_y) : '0;
      c6_en = feed_inv;
    end
  end
  acc_addsub #(.W(W)) u_c6 (
    .clk, .rst_n, .en(c6_en), .clr(c5), .sub(c6), .rev(1'b0), .a(c6_a), .y(c6_y), .d(c6_d));

  // ---------------- RAM2: x(1..7) in array order ------------------------
  logic [2:0]          r2_waddr;
  logic signed [X_W-1:0] r2_rdata;
  assign r2_waddr = (rec_mode == M_FDCT) ? 3'd7 - slot : slot + 3'd1;
  reorder_ram #(.W(X_W), .DEPTH(N)) u_ram2 (
    .clk, .we(rec_v && !frame_end), .wbank(parity), .waddr(r2_waddr), .wdata(X_W'(c6_y)),
    .rbank(~parity), .raddr(slot + 3'd1), .rdata(r2_rdata));

  // ---------------- words into the array ----------------------------------
  always_comb begin
    if (feed_fwd) begin
      x_push = !frame_end;
      x_in   = r2_rdata;
    end else begin
      x_push = feed_inv && !feed_extra;
      x_in   = X_W'(mul_y);
    end
  end

  // ---------------- POST: C1 add/sub, T stream ----------------------------
  logic signed [T_W-1:0] t_dly;
  logic signed [W-1:0]   tval;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t_dly <= '0;
    else        t_dly <= t_out;
  end
  assign t_shift = post_v;
  always_comb begin
    if (c4)                     tval = d_post.t0;
    else if (post_mode == M_FDST) tval = W'(t_out);
    else                        tval = W'(t_dly);
    c1sum = (tval <<< 1) + (c1 ? -d_post.alpha : d_post.alpha);
  end

  // ---------------- C3 add/sub with D: Y(0)/Y(N) sum or y recursion -------
  logic                post_inv, c3_en;
  logic signed [W-1:0] c3_a, c3_y, c3_d;
  assign post_inv = post_v && !post_mode[1];
  always_comb begin
    if (post_inv) begin
      c3_a  = (slot == 3'd0) ? (c1sum >>> 1) : c1sum;
      c3_en = 1'b1;
    end else begin
      c3_a  = in_w;
      c3_en = in_fwd;
    end
  end
  acc_addsub #(.W(W)) u_c3 (
    .clk, .rst_n, .en(c3_en), .clr(c5), .sub(c3), .rev(c3_rev), .a(c3_a), .y(c3_y), .d(c3_d));

  // ---------------- delta capture and per-block data pipeline -------------
  logic signed [W-1:0] delta_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delta_q <= '0;
      d_rec   <= '0;
      d_feed  <= '0;
      d_arr   <= '0;
      d_post  <= '0;
    end else begin
      if (feed_inv && feed_extra) delta_q <= W'(mul_y);
      if (frame_end) begin
        d_rec       <= '0;
        d_rec.ysum  <= c3_y;
        d_feed      <= d_rec;
        d_feed.alpha <= c6_y;                 // x(0) (FDCT) / x(N) (FDST)
        if (feed_fwd) d_arr <= d_feed;
        else begin
          d_arr.ysum  <= '0;
          d_arr.alpha <= (cur_mode == M_IDST) ? W'(mul_y) : delta_q;
          d_arr.t0    <= c6_y;
        end
        d_post <= d_arr;
      end
    end
  end

  // ---------------- output register ---------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_mode  <= M_IDST;
      out_data  <= '0;
    end else begin
      out_valid <= post_v;
      out_first <= post_v && (slot == 3'd0);
      out_mode  <= post_mode;
      if (post_mode[1]) out_data <= c2 ? D_W'(d_post.ysum) : mul_y;
      else              out_data <= D_W'(c3_y);
    end
  end

  // keep the arr_v status visible for debug and equivalence with the diagram
  logic unused;
  assign unused = ^{arr_v, c6_d, c3_d};
endmodule
