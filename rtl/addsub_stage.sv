// addsub_stage: the Add/Sub stage between the P/S converters and the PEs.
//
// From the digit streams of x(1), x(2), x(3), x(5), x(6), x(7) it forms, digit
// by digit and least significant digit first, the three sums
// x(1)+x(7), x(2)+x(6), x(3)+x(5) (fed to the PEs of even k) and the three
// differences x(1)-x(7), x(2)-x(6), x(3)-x(5) (fed to the PEs of odd k). This
// folding uses cos((N-n)k*pi/N) = (-1)^k cos(n*k*pi/N) and halves the ROM
// address of every PE. x(4) is not serialised: it is latched in parallel on
// `load` (the cycle the P/S converters load) and held for the whole block,
// because its coefficient cos(k*pi/2) is 0 or +/-1 and it is added after the
// DA accumulation. `first` marks the first digit, one cycle after `load`.
// Result digits are combinational from the input digits and the carry flops.
// digit layout of `dig`: [0]=x(1) [1]=x(2) [2]=x(3) [3]=x(5) [4]=x(6) [5]=x(7).
module addsub_stage
#(
  parameter int X_W   = 12,
  parameter int DIG_W = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic                        first,
  input  logic [5:0][DIG_W-1:0]       dig,
  input  logic signed [X_W-1:0]       x4_in,
  output logic [dct_pkg::NPAIR-1:0][DIG_W-1:0] sum_dig,
  output logic [dct_pkg::NPAIR-1:0][DIG_W-1:0] dif_dig,
  output logic signed [X_W-1:0]       x4
);
  for (genvar i = 0; i < dct_pkg::NPAIR; i++) begin : g_pair
    // pair (i+1, N-1-i): x(i+1) is dig[i], x(N-1-i) is dig[5-i]
    digit_adder #(.DIG_W(DIG_W)) u_add (
      .clk, .rst_n, .first, .sub(1'b0), .a(dig[i]), .b(dig[5-i]), .s(sum_dig[i]));
    digit_adder #(.DIG_W(DIG_W)) u_sub (
      .clk, .rst_n, .first, .sub(1'b1), .a(dig[i]), .b(dig[5-i]), .s(dif_dig[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x4 <= '0;
    else if (load) x4 <= x4_in;
  end
endmodule
