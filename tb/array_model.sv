// array_model: behavioural model of array_stage for testing the processing
// stage on its own. Same ports and timing: x_push shifts x_in into a 7-word
// chain (first word pushed ends as x(1)); `start` latches the chain; seven
// cycles later t_ready pulses and the T chain holds
//   T(k) = round(sum_{n=1..7} x(n) cos(n k pi/8)),  k = 1..7
// computed in floating point, T(1) on t_out first, advanced by t_shift.
module array_model (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_push,
  input  logic signed [11:0] x_in,
  input  logic               start,
  input  logic               t_shift,
  output logic signed [15:0] t_out,
  output logic               t_ready,
  output logic               busy
);
  localparam real PI = 3.14159265358979323846;
  logic signed [11:0] xr [1:7];
  logic signed [11:0] xl [1:7];
  logic signed [15:0] tr [1:7];
  int cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n <= 7; n++) begin xr[n] <= '0; xl[n] <= '0; tr[n] <= '0; end
      cnt <= 0;
      t_ready <= 1'b0;
    end else begin
      t_ready <= 1'b0;
      if (x_push) begin
        for (int n = 1; n < 7; n++) xr[n] <= xr[n+1];
        xr[7] <= x_in;
      end
      if (start)          cnt <= 1;
      else if (cnt == 7)  cnt <= 0;
      else if (cnt != 0)  cnt <= cnt + 1;
      if (start) xl <= xr;
      if (cnt == 7) begin
        for (int k = 1; k <= 7; k++) begin
          real s;
          s = 0.0;
          for (int n = 1; n <= 7; n++) s += xl[n] * $cos(n * k * PI / 8.0);
          tr[k] <= 16'(int'($floor(s + 0.5)));
        end
        t_ready <= 1'b1;
      end else if (t_shift) begin
        for (int k = 1; k < 7; k++) tr[k] <= tr[k+1];
        tr[7] <= '0;
      end
    end
  end
  assign t_out = tr[1];
  assign busy = (cnt != 0);
endmodule
