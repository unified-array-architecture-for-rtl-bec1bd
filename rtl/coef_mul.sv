// coef_mul: the processing stage's single multiplier with its coefficient
// tables (cos, sin, inv, and the sqrt(2) used for delta).
//
// y = round(a * c / 2^14), with the coefficient c chosen by the transform
// index k (0..8) and the mode:
//   FDCT: cos(k*pi/16)      (beta(k), k = 0..7)
//   FDST: -sin(k*pi/16)     (beta(k), k = 1..8; the 'inv' path)
//   IDCT: cos(k*pi/16), and sqrt(2) for k = 0   (Z(k), sqrt(2)*Y(0))
//   IDST: sin(k*pi/16), and sqrt(2) for k = 8   (Z(k), sqrt(2)*Y(N))
// Coefficients are 16-bit with 14 fraction bits (round(16384*value)); the
// product is rounded half up and truncated to Y_W bits (inputs are expected
// to be in range). Purely combinational. The coefficient set follows the
// transform equations; the number format and rounding are this design's own.
module coef_mul #(
  parameter int A_W = 18,
  parameter int Y_W = 16
) (
  input  logic signed [A_W-1:0] a,
  input  logic        [3:0]     k,
  input  dct_pkg::mode_e        mode,
  output logic signed [Y_W-1:0] y
);
  localparam int CF = dct_pkg::COEF_FRAC;
  localparam int P_W = A_W + dct_pkg::COEF_W;

  logic signed [dct_pkg::COEF_W-1:0] c;
  logic signed [P_W-1:0]             p;
  int                                kk;

  always_comb begin
    kk = int'(k);
    unique case (mode)
      dct_pkg::M_FDCT: c = dct_pkg::sin16(8 - kk);
      dct_pkg::M_FDST: c = -dct_pkg::sin16(kk);
      dct_pkg::M_IDCT: c = (kk == 0) ? dct_pkg::SQRT2 : dct_pkg::sin16(8 - kk);
      default:         c = (kk == 8) ? dct_pkg::SQRT2 : dct_pkg::sin16(kk);
    endcase
    p = (P_W'(a) * P_W'(c)) + P_W'(signed'(1 << (CF - 1)));
    y = Y_W'(p >>> CF);
  end
endmodule
