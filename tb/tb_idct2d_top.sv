// tb_idct2d_top: end-to-end testbench of the 8x8 2-D IDCT processor, at the
// default parameters.
//
// Blocks are made from random pixel blocks by a double-precision forward
// DCT, rounded and clipped to 12 bits, plus hand-made blocks that drive the
// column-input and output saturation. Each block's expected result is the
// double-precision 2-D IDCT, rounded and clipped to -256..255. The blocks
// are fed back to back (START every 80 cycles) with some longer gaps. Every
// output pixel must be within TOL = 5 of the reference (the accuracy of the
// default 14-digit accumulators; 18 digits bring it to 1); the testbench also checks
// the output order (column by column), the latency from START to the first
// result (115 cycles) and the rate (64 results per 80 cycles). It counts the
// mechanisms exercised: the rotators' first-digit operand exchange and
// negation, accumulator subtraction, GUARD remainder recoding, the
// converter's borrow path, column-input and output saturation, both
// transpose-memory address patterns, back-to-back blocks and idle gaps. A
// mechanism never seen counts as a failure.
module tb_idct2d_top;
  import idct_pkg::*;

  localparam int NBLK = 300;
  localparam int TOL  = 5;      // peak pixel error allowed at ROM_W = 14
  localparam real PI  = 3.14159265358979323846;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start;
  logic [11:0] din;
  logic       ready;
  logic [8:0] dout;

  int checks = 0, failures = 0;

  idct2d_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din(din), .ready(ready), .dout(dout)
  );

  always #5 clk = ~clk;

  int  coef [NBLK][64];
  int  expp [NBLK][64];
  int  start_cycle [NBLK];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_swap = 0, n_neg = 0, n_sub = 0, n_recode = 0, n_borrow = 0;
  int n_colsat = 0, n_outsat = 0, n_par0 = 0, n_par1 = 0, n_b2b = 0, n_gap = 0;
  int hist_err [4];
  int maxerr = 0;

  function automatic real cc(input int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  // forward 2-D DCT of a pixel block, rounded and clipped to 12 bits
  function automatic void fdct(input int pix[64], output int c[64]);
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real s;
        s = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            s += real'(pix[8*y+x]) * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        s = 0.25 * cc(u) * cc(v) * s;
        c[8*v+u] = (s >= 0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
        if (c[8*v+u] > 2047)  c[8*v+u] = 2047;
        if (c[8*v+u] < -2048) c[8*v+u] = -2048;
      end
  endfunction

  // reference 2-D IDCT, rounded and clipped to 9 bits
  function automatic void idct(input int c[64], output int p[64]);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        real s;
        int  r;
        s = 0.0;
        for (int v = 0; v < 8; v++)
          for (int u = 0; u < 8; u++)
            s += cc(u) * cc(v) * real'(c[8*v+u]) * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        s = 0.25 * s;
        r = (s >= 0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
        if (r > 255)  r = 255;
        if (r < -256) r = -256;
        p[8*y+x] = r;
      end
  endfunction

  // block generation
  initial begin
    int pix [64];
    int c [64];
    int p [64];
    for (int b = 0; b < NBLK; b++) begin
      if (b == 1) begin
        // first row drives a row result above the column core's full scale
        for (int k = 0; k < 64; k++) c[k] = 0;
        for (int u = 0; u < 8; u++) c[u] = ($cos(u*PI/16.0) >= 0.0) ? 2047 : -2048;
        c[0] = 2047;
      end else if (b == 2) begin
        for (int k = 0; k < 64; k++) c[k] = 0;
        c[0] = 2047;                              // all pixels above 255
      end else if (b == 3) begin
        for (int k = 0; k < 64; k++) c[k] = 0;
        c[0] = -2048;                             // all pixels at -256
      end else if (b == 4) begin
        // large coefficients of opposite sign in rows/columns 1 and 7:
        // the rotators' first digits then have opposite signs
        for (int k = 0; k < 64; k++) c[k] = 0;
        c[1] = -1500; c[7] = 1400; c[8] = -2000; c[56] = 2000;
      end else begin
        int lo, hi;
        lo = (b % 3 == 0) ? 256 : (b % 3 == 1) ? 5 : 300;
        hi = (b % 3 == 0) ? 255 : (b % 3 == 1) ? 5 : 300;
        for (int k = 0; k < 64; k++) pix[k] = int'($urandom_range(0, lo + hi)) - lo;
        fdct(pix, c);
        if (b % 2 == 1) for (int k = 0; k < 64; k++) c[k] = -c[k];
        for (int k = 0; k < 64; k++) if (c[k] > 2047) c[k] = 2047;
      end
      idct(c, p);
      for (int k = 0; k < 64; k++) begin coef[b][k] = c[k]; expp[b][k] = p[k]; end
    end
  end

  // stimulus: START every 80 cycles, with an idle gap after every 7th block
  initial begin
    start = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b % 7 == 6) begin
        repeat (int'($urandom_range(1, 30))) @(posedge clk);
        n_gap++;
      end else if (b > 0) n_b2b++;
      for (int r = 0; r < 8; r++)
        for (int t = 0; t < 10; t++) begin
          start <= (r == 0 && t == 0);
          if (r == 0 && t == 0) start_cycle[b] = cycle + 1;
          din   <= (t < 8) ? 12'(coef[b][8*r+t]) : 12'h0;
          @(posedge clk);
        end
    end
    start <= 1'b0;
  end

  // checker: results leave column by column
  initial begin
    int b, k, first_cycle;
    b = 0; k = 0; first_cycle = 0;
    for (int e = 0; e < 4; e++) hist_err[e] = 0;
    wait (rst_n);
    while (b < NBLK) begin
      @(posedge clk);
      if (ready) begin
        int r, c, got, err;
        c = k / 8; r = k % 8;
        got = int'($signed(dout));
        err = got - expp[b][8*r+c];
        if (err < 0) err = -err;
        hist_err[(err > 3) ? 3 : err]++;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d x(%0d,%0d): got %0d expected %0d", b, r, c, got, expp[b][8*r+c]);
        end
        if (k == 0) begin
          first_cycle = cycle;
          checks++;
          if (cycle - start_cycle[b] != 115) begin
            failures++;
            $display("FAIL block %0d latency %0d cycles", b, cycle - start_cycle[b]);
          end
        end
        k++;
        if (k == 64) begin
          checks++;
          if (cycle - first_cycle != 77) begin   // 64 results in 78 cycles
            failures++;
            $display("FAIL block %0d: 64 results took %0d cycles", b, cycle - first_cycle + 1);
          end
          k = 0; b++;
        end
      end
    end
    $display("tb_idct2d_top: %0d blocks, |error| 0/1/2/>2: %0d/%0d/%0d/%0d", NBLK, hist_err[0], hist_err[1], hist_err[2], hist_err[3]);
    $display("tb_idct2d_top: peak error %0d", maxerr);
    $display("mechanisms: swap %0d neg %0d sub %0d recode %0d borrow %0d colsat %0d outsat %0d par0 %0d par1 %0d b2b %0d gap %0d",
             n_swap, n_neg, n_sub, n_recode, n_borrow, n_colsat, n_outsat, n_par0, n_par1, n_b2b, n_gap);
    checks += 11;
    if (n_swap == 0)   begin failures++; $display("FAIL: operand exchange never used"); end
    if (n_neg == 0)    begin failures++; $display("FAIL: first-digit negation never used"); end
    if (n_sub == 0)    begin failures++; $display("FAIL: accumulator subtraction never used"); end
    if (n_recode == 0) begin failures++; $display("FAIL: GUARD recoding never used"); end
    if (n_borrow == 0) begin failures++; $display("FAIL: converter borrow never used"); end
    if (n_colsat == 0) begin failures++; $display("FAIL: column input saturation never used"); end
    if (n_outsat == 0) begin failures++; $display("FAIL: output saturation never used"); end
    if (n_par0 == 0)   begin failures++; $display("FAIL: row-major memory pattern never used"); end
    if (n_par1 == 0)   begin failures++; $display("FAIL: column-major memory pattern never used"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back blocks"); end
    if (n_gap == 0)    begin failures++; $display("FAIL: no idle gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism probes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_row.u_r4.first_digit && dut.u_row.u_r4.u_adec.swap) n_swap++;
    if (dut.u_col.u_r4.first_digit && dut.u_col.u_r4.u_adec.swap) n_swap++;
    if (dut.u_row.u_r4.first_digit && dut.u_row.u_r4.neg_p && dut.u_row.u_r4.neg_q) n_neg++;
    if (dut.u_row.u_r4.en && dut.u_row.u_r4.aors_p) n_sub++;
    if (dut.u_col.u_r2.en && dut.u_col.u_r2.u_acc_q.rem != 0) n_recode++;
    if (dut.u_col.u_bank.g_rnnc[0].u_rnnc.minus) n_borrow++;
    if (dut.col_we && $signed(dut.ram_rdata) != $signed(dut.col_din) / 2) n_colsat++;
    if (dut.col_valid && (dut.pix > 255 || dut.pix < -256)) n_outsat++;
    if (dut.ram_we && dut.row_idx == 3'd1) begin
      if (dut.u_ctrl.w_par) n_par1++; else n_par0++;
    end
  end

  initial begin
    repeat (NBLK * 110 + 400) @(posedge clk);
    failures++;
    $display("tb_idct2d_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
