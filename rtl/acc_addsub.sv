// acc_addsub: add/subtract unit with a feedback register (D), as used for the
// processing stage's recursions and running sums.
//
//   b = clr ? 0 : D                        (the 0 / D select is control C5)
//   y = sub ? (rev ? b - a : a - b) : a + b
//   D <= y  when en
// `y` is combinational; D updates at the clock edge. With sub=1, rev=0 it is
// the recursion x(n) = y(n) - x(n+1) of the forward DCT and y(n) = t(n) -
// y(n-1) of the IDCT; with sub=0 it is a running sum or the DST/IDST
// recursions; with rev it subtracts the new operand from the running value
// (alternating sums). The unit follows the add/sub-with-D blocks of the
// processing stage; the `rev` input is this design's addition.
module acc_addsub #(
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  logic                sub,
  input  logic                rev,
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] d
);
  logic signed [W-1:0] b;

  always_comb begin
    b = clr ? '0 : d;
    if (!sub)     y = a + b;
    else if (rev) y = b - a;
    else          y = a - b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= y;
  end
endmodule
