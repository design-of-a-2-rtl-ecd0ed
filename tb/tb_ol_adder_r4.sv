// tb_ol_adder_r4: random test of the radix-4 on-line adder and subtractor.
//
// Continuous streams of 10-digit words (first digit zero, then nine random
// radix-4 signed digits, each made of two random binary signed digits, so
// the redundant code {1,1} occurs too) drive an adder and a subtractor. The
// result words, two cycles later, must have exactly the value x + y and
// x - y (digits weighted 4^(9-j)).
module tb_ol_adder_r4;
  import idct_pkg::*;
  localparam int NF = 3000;
  localparam int N  = NF * 10;

  logic clk = 1'b0, rst_n = 1'b0;
  r4_t  x, y, sa, ss;
  r4_t  xin [N];
  r4_t  yin [N];
  int   va [N];
  int   vs [N];
  int checks = 0, failures = 0;

  ol_adder_r4 #(.SUB(1'b0)) dut_a (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .s(sa));
  ol_adder_r4 #(.SUB(1'b1)) dut_s (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .s(ss));

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < N; n++) begin
      xin[n] = (n % 10 == 0) ? '0 : r4_t'($urandom_range(0, 255));
      yin[n] = (n % 10 == 0) ? '0 : r4_t'($urandom_range(0, 255));
    end
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N + 3; n++) begin
      x <= (n < N) ? xin[n] : '0;
      y <= (n < N) ? yin[n] : '0;
      @(posedge clk);
      #1;
      // after the edge that samples input n, the result of input n-1 is out
      if (n >= 1 && n - 1 < N) begin va[n-1] = r4_val(sa); vs[n-1] = r4_val(ss); end
    end
    for (int f = 0; f < NF; f++) begin
      int ex, ey, ga, gs;
      ex = 0; ey = 0; ga = 0; gs = 0;
      for (int j = 0; j < 10; j++) begin
        ex = 4 * ex + r4_val(xin[10*f+j]);
        ey = 4 * ey + r4_val(yin[10*f+j]);
        ga = 4 * ga + va[10*f+j];
        gs = 4 * gs + vs[10*f+j];
      end
      checks += 2;
      if (ga != ex + ey) begin failures++; if (failures < 10) $display("FAIL word %0d: %0d + %0d gave %0d", f, ex, ey, ga); end
      if (gs != ex - ey) begin failures++; if (failures < 10) $display("FAIL word %0d: %0d - %0d gave %0d", f, ex, ey, gs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("tb_ol_adder_r4: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
