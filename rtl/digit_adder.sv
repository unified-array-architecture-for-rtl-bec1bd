// digit_adder: digit-serial adder/subtractor used in the array's Add/Sub stage.
//
// Each cycle it adds (sub=0) or subtracts (sub=1) one DIG_W-bit digit of two
// two's complement operands that arrive least significant digit first, and
// keeps the carry in a flip-flop for the next digit. `first` marks the first
// digit of a word: the carry then starts from 0 for addition and from 1 for
// subtraction (a - b = a + ~b + 1). The result digit is combinational; the
// carry updates at the clock edge. Operands must be sign-extended by the
// source for as many digits as the result needs. The digit-serial structure is
// this design's reading of the Add/Sub box of the architecture.
module digit_adder #(
  parameter int DIG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,
  input  logic             sub,
  input  logic [DIG_W-1:0] a,
  input  logic [DIG_W-1:0] b,
  output logic [DIG_W-1:0] s
);
  logic             cy_q, cin;
  logic [DIG_W:0]   full;

  always_comb begin
    cin  = first ? sub : cy_q;
    full = {1'b0, a} + {1'b0, (sub ? ~b : b)} + {{DIG_W{1'b0}}, cin};
  end

  assign s = full[DIG_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cy_q <= 1'b0;
    else        cy_q <= full[DIG_W];
  end
endmodule
