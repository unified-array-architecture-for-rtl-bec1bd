// da_pe: distributed-arithmetic processing element computing one T(k).
//
// Input A carries one DIG_W-bit digit of each of the three folded operands
// (sums for even k, differences for odd k), least significant digit first, one
// digit step per cycle with `en`. A 2^A-word ROM holds every combination
// sum_i d_i * c_i of the three coefficients c_i = cos(i*k*pi/8) (dct_pkg::ROM_FRAC
// fraction bits). The accumulator register (D) is shifted right by one digit
// and the ROM word added, so after the last step it holds the inner product
// with GUARD fraction bits. The operands are two's complement, so in the last
// (sign) step, marked by `last`, each digit is 00 or 11 and is worth 0 or -1:
// the ROM word addressed by the low bit of each digit is subtracted instead.
// `clear` marks the first step (the old accumulator value is ignored).
// T(k) = accumulator + B is combinational from the adder output, so the value
// is valid during the `last` cycle and can be loaded into the T register chain
// at that clock edge. The ROM/accumulator/adder structure and the 6/14/16 bit
// widths follow the architecture; the guard bits, the wider accumulator and
// the sign-step handling are this design's choices.
module da_pe
#(
  parameter int K      = 1,       // T(K) computed by this PE
  parameter int DIG_W  = 2,
  parameter int ROM_W  = 14,
  parameter int T_W    = 16,
  parameter int GUARD  = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      en,
  input  logic                      last,
  input  logic [DIG_W*dct_pkg::NPAIR-1:0]    a,
  input  logic signed [T_W-1:0]     b,
  output logic signed [T_W-1:0]     t
);
  localparam int AW     = DIG_W * dct_pkg::NPAIR;
  localparam int ACC_W  = T_W + GUARD + 1;
  localparam int SH     = GUARD + DIG_W*(dct_pkg::NDIG-1) - dct_pkg::ROM_FRAC;  // ROM word alignment
  localparam logic [AW-1:0] LOW_BITS = AW'({dct_pkg::NPAIR{{(DIG_W-1){1'b0}}, 1'b1}});

  // ROM contents, a constant table built from the coefficient function.
  logic signed [ROM_W-1:0] rom [2**AW];
  for (genvar w = 0; w < 2**AW; w++) begin : g_rom
    assign rom[w] = dct_pkg::da_rom_word(K, w);
  end

  logic signed [ACC_W-1:0] acc_q, base, term, sum;
  logic        [AW-1:0]    addr;

  always_comb begin
    addr = last ? (a & LOW_BITS) : a;
    term = ACC_W'(rom[addr]) <<< SH;
    if (clear) base = '0;
    else       base = acc_q >>> DIG_W;     // arithmetic: acc_q is signed
    sum  = last ? base - term : base + term;
    t    = T_W'(sum >>> GUARD) + b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= sum;
  end
endmodule
