// ps_conv: parallel-to-serial converter of the array stage (P/S).
//
// On `load` it captures a signed X_W-bit word; from the next cycle `digit`
// presents the word DIG_W bits at a time, least significant digit first. After
// the X_W/DIG_W real digits it keeps presenting copies of the sign bit, so that
// the digit-serial adder behind it sees a sign-extended operand and can produce
// the one extra digit a sum needs. One digit per clock; `load` may come every
// cycle. Word and digit sizes follow the architecture; the digit order and the
// sign extension are this design's choice.
module ps_conv #(
  parameter int X_W   = 12,
  parameter int DIG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [X_W-1:0]   din,
  output logic [DIG_W-1:0] digit
);
  logic [X_W-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sh <= '0;
    else if (load) sh <= din;
    else           sh <= {{DIG_W{sh[X_W-1]}}, sh[X_W-1:DIG_W]};  // arithmetic shift by one digit
  end

  assign digit = sh[DIG_W-1:0];
endmodule
