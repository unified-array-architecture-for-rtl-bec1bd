// tb_coef_mul: checks the multiplier and coefficient selection for every mode
// and index against coefficients computed here from $cos/$sin/$sqrt:
// y = floor((a * round(16384 c) + 8192) / 16384).
module tb_coef_mul;
  localparam real PI = 3.14159265358979323846;
  logic signed [17:0] a = 0;
  logic [3:0] k = 0;
  dct_pkg::mode_e mode = dct_pkg::M_FDCT;
  logic signed [15:0] y;
  coef_mul dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      real c;
      longint cq, e;
      int kk;
      mode = dct_pkg::mode_e'(t % 4);
      kk = $urandom_range(0, 8);
      k = 4'(kk);
      a = 18'(int'($urandom_range(0, 40000)) - 20000);
      if (t < 4) a = 18'sd30000;
      case (mode)
        dct_pkg::M_FDCT: c = $cos(kk * PI / 16.0);
        dct_pkg::M_FDST: c = -$sin(kk * PI / 16.0);
        dct_pkg::M_IDCT: c = (kk == 0) ? $sqrt(2.0) : $cos(kk * PI / 16.0);
        default:         c = (kk == 8) ? $sqrt(2.0) : $sin(kk * PI / 16.0);
      endcase
      cq = longint'($floor(c * 16384.0 + 0.5));
      e = (longint'(a) * cq + 8192) >>> 14;
      #1;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        $display("ERROR: mode %0d k %0d a %0d: y %0d expected %0d", mode, kk, a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
