// dct_dst_unified: unified 8-point DCT / DST / IDCT / IDST engine.
//
// One array computes the kernel T(k) = sum_{n=1..7} v(n) cos(n*k*pi/8) shared
// by all four transforms; the processing stage maps each transform onto it
// (x(n) recursions or Z(k) scaling before, 2T +/- alpha times beta(k) or the
// y(n) recursion after). The two stages form a loop: the processing stage
// sends seven words per block into the array (In') and takes seven T(k) back
// (Out'). `in_mode` selects the transform per block:
//   11 FDCT   10 FDST   01 IDCT   00 IDST.
//
// Interface: a block of eight D_W-bit words enters on consecutive cycles; it
// may start when in_ready is high with in_valid in the first cycle, and
// in_valid must stay high for the other seven. Results leave as eight words
// on consecutive out_valid cycles with out_first on the first and out_mode
// giving the transform. Throughput is one block per 8 cycles as long as the
// direction (forward/inverse) does not change; a change waits for the
// pipeline to empty (`stall` shows a held-back block). Latency to the first
// result: 33 cycles forward, 17 cycles inverse.
// The architecture is the published one; word widths beyond those given for
// the array and all timing details are this design's choices.
module dct_dst_unified #(
  parameter int D_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [1:0]            in_mode,
  input  logic signed [D_W-1:0] in_data,
  output logic                  out_valid,
  output logic                  out_first,
  output logic [1:0]            out_mode,
  output logic signed [D_W-1:0] out_data,
  output logic                  stall
);
  localparam int X_W = dct_pkg::X_W;
  localparam int T_W = dct_pkg::T_W;

  logic                  x_push, start, t_shift, t_ready, busy;
  logic signed [X_W-1:0] x_in;
  logic signed [T_W-1:0] t_out;
  dct_pkg::mode_e        om;

  proc_stage #(.D_W(D_W), .X_W(X_W), .T_W(T_W)) u_proc (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode(dct_pkg::mode_e'(in_mode)), .in_data,
    .out_valid, .out_first, .out_mode(om), .out_data, .stall,
    .x_push, .x_in, .array_start(start), .t_shift, .t_out);

  array_stage #(.X_W(X_W), .T_W(T_W)) u_array (
    .clk, .rst_n, .x_push, .x_in, .start, .t_shift, .t_out, .t_ready, .busy);

  assign out_mode = om;

  logic unused;
  assign unused = ^{t_ready, busy};
endmodule
