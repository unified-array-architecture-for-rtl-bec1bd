// dct_pkg: constants, types and coefficient functions shared by the unified
// 8-point DCT / DST / IDCT / IDST engine.
//
// The engine computes all four transforms through one common kernel
//   T(k) = sum_{n=1..N-1} v(n) * cos(n*k*pi/N),  k = 1..N-1,
// evaluated by a distributed-arithmetic (DA) array, with the transform-specific
// pre- and post-processing done around it. Widths X_W, T_W, DIG_W, ROM_W and
// the mode encoding follow the published architecture; the fraction widths and
// the 16-bit processing-stage datapath are this implementation's own choices.
// Some constants are used only by the modules, not inside the package, so a
// lint run on this package by itself reports them as unused.
package dct_pkg;

  // Transform length (eight points, the only size the architecture is drawn for).
  localparam int N       = 8;
  localparam int NPAIR   = N/2 - 1;       // operand pairs (n, N-n) per PE: 3
  // Array stage word sizes.
  localparam int X_W     = 12;            // X(n) registers
  localparam int T_W     = 16;            // T(k) registers
  localparam int DIG_W   = 2;             // bits per serial digit
  localparam int NDIG    = (X_W + 1 + DIG_W - 1) / DIG_W;  // digits of a 13-bit sum: 7
  localparam int ROM_W   = 14;            // DA ROM word
  localparam int ROM_FRAC = 10;           // fraction bits of the ROM words
  localparam int ADDR_W  = DIG_W * NPAIR; // PE ROM address: 6
  // Processing stage.
  localparam int D_W       = 16;          // external and internal data words
  localparam int COEF_W    = 16;          // multiplier coefficients
  localparam int COEF_FRAC = 14;

  // mode[1] = 1: forward, mode[0] = 1: cosine.
  typedef enum logic [1:0] {
    M_IDST = 2'b00,
    M_IDCT = 2'b01,
    M_FDST = 2'b10,
    M_FDCT = 2'b11
  } mode_e;

  // round(1024 * cos(j*pi/8)) for j = 0..4; other j folded by symmetry.
  function automatic int da_cos(input int j);
    int jj, m, v;
    jj = j % (2*N);
    if (jj < 0) jj += 2*N;
    if (jj > N) jj = 2*N - jj;            // cos is even around pi
    m = (jj > N/2) ? N - jj : jj;         // fold to 0..4
    case (m)
      0: v = 1024;
      1: v = 946;
      2: v = 724;
      3: v = 392;
      default: v = 0;
    endcase
    return (jj > N/2) ? -v : v;
  endfunction

  // DA ROM word of the PE that computes T(k): sum over the three operands of
  // digit * round(1024*cos(i*k*pi/8)), digit i in addr[2i-2 +: 2], unsigned.
  function automatic logic signed [ROM_W-1:0] da_rom_word(input int k, input int addr);
    int acc;
    acc = 0;
    for (int i = 1; i <= NPAIR; i++)
      acc += ((addr >> (DIG_W*(i-1))) & ((1 << DIG_W) - 1)) * da_cos(i*k);
    return ROM_W'(acc);
  endfunction

  // round(16384 * sin(m*pi/16)), m = 0..8.
  function automatic logic signed [COEF_W-1:0] sin16(input int m);
    case (m)
      0: return 16'sd0;
      1: return 16'sd3196;
      2: return 16'sd6270;
      3: return 16'sd9102;
      4: return 16'sd11585;
      5: return 16'sd13623;
      6: return 16'sd15137;
      7: return 16'sd16069;
      default: return 16'sd16384;
    endcase
  endfunction

  localparam logic signed [COEF_W-1:0] SQRT2 = 16'sd23170;  // round(16384*sqrt(2))

endpackage
