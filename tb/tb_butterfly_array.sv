// tb_butterfly_array: random test of the two-stage on-line butterfly.
//
// Twelve random digit streams (10-digit words starting with two zero
// digits, as the rotators produce them) drive the array without gaps. Each
// result word x(0..7), four cycles later, must have exactly the value given
// by the butterfly equations
//   e0 = a00+a02, e1 = b00-b02, e2 = b00+b02, e3 = a00-a02,
//   o0 = a11+a03, o1 = b01-a13, o2 = a01-b13, o3 = b03-b11,
//   x(i) = e_i + o_i, x(7-i) = e_i - o_i.
module tb_butterfly_array;
  import idct_pkg::*;
  localparam int NF = 1500;
  localparam int N  = NF * 10;

  logic clk = 1'b0, rst_n = 1'b0;
  r4_t  in [12];          // a00 b00 a02 b02 a03 b03 a13 b13 a01 b01 a11 b11
  r4_t  xr [8];
  r4_t  din  [N][12];
  int   got  [N][8];
  int checks = 0, failures = 0;

  butterfly_array dut (.clk(clk), .rst_n(rst_n),
    .a00(in[0]), .b00(in[1]), .a02(in[2]), .b02(in[3]), .a03(in[4]), .b03(in[5]),
    .a13(in[6]), .b13(in[7]), .a01(in[8]), .b01(in[9]), .a11(in[10]), .b11(in[11]),
    .xr(xr));

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < N; n++)
      for (int k = 0; k < 12; k++)
        din[n][k] = (n % 10 < 2) ? '0 : r4_t'($urandom_range(0, 255));
    for (int k = 0; k < 12; k++) in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N + 5; n++) begin
      for (int k = 0; k < 12; k++) in[k] <= (n < N) ? din[n][k] : '0;
      @(posedge clk);
      #1;
      // after the edge that samples input n, the result of input n-3 is out
      if (n >= 3 && n - 3 < N) for (int i = 0; i < 8; i++) got[n-3][i] = r4_val(xr[i]);
    end
    for (int f = 0; f < NF; f++) begin
      int v [12];
      int g [8];
      int e [4];
      int o [4];
      for (int k = 0; k < 12; k++) v[k] = 0;
      for (int i = 0; i < 8; i++) g[i] = 0;
      for (int j = 0; j < 10; j++) begin
        for (int k = 0; k < 12; k++) v[k] = 4 * v[k] + r4_val(din[10*f+j][k]);
        for (int i = 0; i < 8; i++) g[i] = 4 * g[i] + got[10*f+j][i];
      end
      e[0] = v[0] + v[2];  e[1] = v[1] - v[3];  e[2] = v[1] + v[3];  e[3] = v[0] - v[2];
      o[0] = v[10] + v[4]; o[1] = v[9] - v[6];  o[2] = v[8] - v[7];  o[3] = v[5] - v[11];
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (g[i] != e[i] + o[i]) begin failures++; if (failures < 10) $display("FAIL word %0d x(%0d)=%0d expected %0d", f, i, g[i], e[i] + o[i]); end
        if (g[7-i] != e[i] - o[i]) begin failures++; if (failures < 10) $display("FAIL word %0d x(%0d)=%0d expected %0d", f, 7-i, g[7-i], e[i] - o[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("tb_butterfly_array: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
