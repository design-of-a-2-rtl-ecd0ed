// tb_rnnc: random test of the on-the-fly converter. Words of ten random
// radix-4 signed digits follow each other without gaps (`first` on each
// word's first digit); one cycle after a word's last digit, x0 must hold its
// value sum d_j 4^(9-j) modulo 2^16. The borrow path (negative digit) and
// the zero digit must both occur.
module tb_rnnc;
  import idct_pkg::*;
  localparam int NF = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic first;
  r4_t  din;
  logic [15:0] x0;
  int checks = 0, failures = 0, n_minus = 0, n_zero = 0;

  rnnc dut (.clk(clk), .rst_n(rst_n), .first(first), .din(din), .x0(x0));

  always #5 clk = ~clk;

  initial begin
    first = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      int v;
      v = 0;
      for (int j = 0; j < 10; j++) begin
        r4_t d;
        d = r4_t'($urandom_range(0, 255));
        if (f % 4 == 0 && j < 3) d = '0;
        if (r4_val(d) < 0) n_minus++;
        if (r4_val(d) == 0) n_zero++;
        v = 4 * v + r4_val(d);
        first <= (j == 0);
        din   <= d;
        @(posedge clk);
        #1;
      end
      // one cycle after the last digit: the converted word
      checks++;
      if (x0 !== 16'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: x0=%h expected %h", f, x0, 16'(v));
      end
    end
    checks += 2;
    if (n_minus == 0) begin failures++; $display("FAIL: no negative digit"); end
    if (n_zero == 0)  begin failures++; $display("FAIL: no zero digit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 11 + 100) @(posedge clk);
    failures++;
    $display("tb_rnnc: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
