// array_stage: the DA array that evaluates the common kernel
//   T(k) = sum_{n=1..7} x(n) * cos(n*k*pi/8),   k = 1..7
// shared by all four transforms.
//
// Structure: a chain of seven X_W-bit X registers (X(1)..X(7)); six P/S
// converters for X(1..3) and X(5..7); the Add/Sub stage that folds them into
// three sums and three differences; an Inv negator for x(4); PE1..PE7, where
// PE i computes T(8-i) (odd k from the differences with B = 0, even k from the
// sums with B = +x(4) for k = 4 and B = -x(4) for k = 2, 6); and a chain of
// seven T_W-bit T registers.
//
// Timing (one block every 8 cycles is possible):
//  * x_push shifts x_in into the X chain at X(7); the word pushed first ends in
//    X(1), so a block is pushed as x(1), x(2), ..., x(7).
//  * start copies the X chain into the P/S converters and latches x(4). During
//    the next NDIG (=7) cycles the PEs take one digit step each. New words may
//    be pushed into the X chain from the start cycle on.
//  * At the edge that ends the last digit step the T chain loads T(1..7) and
//    t_ready pulses for one cycle; the T chain then shows T(1) on t_out and
//    each t_shift moves the next T(k) to t_out.
//  * start must not be repeated while a block is in its digit steps.
// The block structure is the published one; chain directions, the x(4) latch
// and the step sequencing are this design's choices.
// The reset also disables the assertions (disable iff), so lint tools report
// rst_n as used both asynchronously and synchronously; that use is in the
// checks only, not in the circuit.
module array_stage
#(
  parameter int X_W = 12,
  parameter int T_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_push,
  input  logic signed [X_W-1:0] x_in,
  input  logic                  start,
  input  logic                  t_shift,
  output logic signed [T_W-1:0] t_out,
  output logic                  t_ready,
  output logic                  busy
);
  localparam int NM = dct_pkg::N - 1;   // 7 words / 7 PEs

  // ---- X register chain -------------------------------------------------
  logic signed [X_W-1:0] xr [1:NM];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n <= NM; n++) xr[n] <= '0;
    end else if (x_push) begin
      for (int n = 1; n < NM; n++) xr[n] <= xr[n+1];
      xr[NM] <= x_in;
    end
  end

  // ---- digit-step sequencer ----------------------------------------------
  localparam int SW = $clog2(dct_pkg::NDIG + 1);
  localparam logic [SW-1:0] LAST_STEP = SW'(dct_pkg::NDIG);
  logic [SW-1:0] step_q;   // 0: idle, 1..NDIG: step number
  logic en, first, last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 step_q <= '0;
    else if (start)             step_q <= 1;
    else if (step_q == LAST_STEP)    step_q <= '0;
    else if (step_q != 0)       step_q <= step_q + 1'b1;
  end
  assign en    = (step_q != 0);
  assign first = (step_q == 1);
  assign last  = (step_q == LAST_STEP);
  assign busy  = en;

  // ---- P/S converters ----------------------------------------------------
  logic [5:0][dct_pkg::DIG_W-1:0] dig;
  localparam int PS_IDX [6] = '{1, 2, 3, 5, 6, 7};
  for (genvar p = 0; p < 6; p++) begin : g_ps
    ps_conv #(.X_W(X_W), .DIG_W(dct_pkg::DIG_W)) u_ps (
      .clk, .rst_n, .load(start), .din(xr[PS_IDX[p]]), .digit(dig[p]));
  end

  // ---- Add/Sub stage and Inv ---------------------------------------------
  logic [dct_pkg::NPAIR-1:0][dct_pkg::DIG_W-1:0] sum_dig, dif_dig;
  logic signed [X_W-1:0]       x4;
  logic signed [T_W-1:0]       x4_pos, x4_neg;
  addsub_stage #(.X_W(X_W), .DIG_W(dct_pkg::DIG_W)) u_addsub (
    .clk, .rst_n, .load(start), .first, .dig, .x4_in(xr[dct_pkg::N/2]),
    .sum_dig, .dif_dig, .x4);
  assign x4_pos = T_W'(x4);
  assign x4_neg = -x4_pos;          // Inv

  // ---- PEs: PE i computes T(N-i) ---------------------------------
  logic signed [T_W-1:0] pe_t [1:NM];   // indexed by k
  for (genvar i = 1; i <= NM; i++) begin : g_pe
    localparam int KK = dct_pkg::N - i;
    logic signed [T_W-1:0] b;
    assign b = (KK % 2 == 1) ? '0 : ((KK % 4 == 0) ? x4_pos : x4_neg);
    da_pe #(.K(KK), .DIG_W(dct_pkg::DIG_W), .ROM_W(dct_pkg::ROM_W), .T_W(T_W)) u_pe (
      .clk, .rst_n, .clear(first), .en, .last,
      .a((KK % 2 == 1) ? dif_dig : sum_dig), .b, .t(pe_t[KK]));
  end

  // ---- T register chain --------------------------------------------------
  logic signed [T_W-1:0] tr [1:NM];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= NM; k++) tr[k] <= '0;
      t_ready <= 1'b0;
    end else begin
      t_ready <= last;
      if (last) begin
        for (int k = 1; k <= NM; k++) tr[k] <= pe_t[k];
      end else if (t_shift) begin
        for (int k = 1; k < NM; k++) tr[k] <= tr[k+1];
        tr[NM] <= '0;
      end
    end
  end
  assign t_out = tr[1];

`ifndef SYNTHESIS
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !en || last)
    else $error("array_stage: start during digit steps");
`endif
endmodule
