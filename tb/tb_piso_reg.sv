// tb_piso_reg: test of the parallel-in serial-out register (12-bit words,
// 16-bit serial words). Groups of eight random words are written one per
// cycle and loaded, one group every ten cycles, the next group's writes
// overlapping the previous group's shifting. For a load in cycle L, xs[i]
// must carry bits (15-2k, 14-2k) of {word i, 4'b0} in cycle L+1+k.
module tb_piso_reg;
  localparam int NG = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] din;
  logic din_we, load;
  logic [1:0] xs [8];
  logic [11:0] grp [NG][8];
  int checks = 0, failures = 0;

  piso_reg dut (.clk(clk), .rst_n(rst_n), .din(din), .din_we(din_we), .load(load), .xs(xs));

  always #5 clk = ~clk;

  int cur = -1, k = 8;

  initial begin
    din = '0; din_we = 0; load = 0;
    for (int g = 0; g < NG; g++) for (int i = 0; i < 8; i++) grp[g][i] = 12'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int g = 0; g <= NG; g++)
      for (int t = 0; t < 10; t++) begin
        din_we <= (g < NG) && t < 8;
        din    <= (g < NG && t < 8) ? grp[g][t] : '0;
        load   <= (g < NG) && t == 8;
        @(posedge clk);
        #1;
        // the load was sampled at the edge ending t = 8: digit k follows
        if (g < NG && t == 8) begin cur = g; k = 0; end
        if (cur >= 0 && k < 8) begin
          for (int i = 0; i < 8; i++) begin
            logic [15:0] w;
            w = {grp[cur][i], 4'b0};
            checks++;
            if (xs[i] != w[15-2*k -: 2]) begin
              failures++;
              if (failures < 10) $display("FAIL group %0d word %0d digit %0d: %b expected %b", cur, i, k, xs[i], w[15-2*k -: 2]);
            end
          end
          k++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NG * 10 + 100) @(posedge clk);
    failures++;
    $display("tb_piso_reg: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
