// tb_idct2d_ieee1180: IEEE Std 1180-1990 accuracy test of the 2-D IDCT
// processor.
//
// Follows the standard's procedure: for each input range (L, H) = (256,
// 255), (5, 5), (300, 300) and both signs, 10000 blocks of random pixels
// from the standard's generator are transformed by a double-precision
// forward DCT, rounded and clipped to -2048..2047, and fed to the processor
// back to back. Each output is compared with the double-precision IDCT,
// rounded and clipped to -256..255, and the standard's figures are
// computed: peak error per position (limit 1), mean square error per
// position (0.06) and overall (0.02), mean error per position (0.015) and
// overall (0.0015). An all-zero block must give all-zero output. Each limit
// not met counts as a failure. The processor is built with 18-digit
// accumulators (ROM_W = 18). It does not meet the limits, at this or any
// wider accumulator: the column core delivers each result in units of 1/8
// pixel from a truncated digit stream, and that error alone (about 0.08
// overall mean square) exceeds the 0.02 allowed. The failures this test
// reports are that shortfall, measured; it runs about one minute.
module tb_idct2d_ieee1180;
  localparam int NBLK  = 10000;
  localparam int ROM_W = 18;
  localparam real PI   = 3.14159265358979323846;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start;
  logic [11:0] din;
  logic        ready;
  logic [8:0]  dout;
  int checks = 0, failures = 0;

  idct2d_top #(.ROM_W(ROM_W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din(din), .ready(ready), .dout(dout)
  );

  always #5 clk = ~clk;

  real cs [8][8];          // C(u)/2 cos((2x+1) u pi / 16)
  int  randx;
  int  coef [NBLK][64];
  int  refp [NBLK][64];
  int  nout;
  int  err_sum [64];
  int  err_sq  [64];
  int  err_pk  [64];

  function automatic int ieee_rand(input int lo, input int hi);
    int  i;
    real x;
    randx = randx * 1103515245 + 12345;
    i = randx & 32'h7ffffffe;
    x = real'(i) / real'(32'h7fffffff);
    x = x * real'(lo + hi + 1);
    return int'($floor(x)) - lo;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // separable transforms with the table cs
  function automatic void fdct(input int p[64], output int c[64]);
    real t [64];
    for (int y = 0; y < 8; y++)
      for (int u = 0; u < 8; u++) begin
        t[8*y+u] = 0.0;
        for (int x = 0; x < 8; x++) t[8*y+u] += cs[u][x] * real'(p[8*y+x]);
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real s;
        s = 0.0;
        for (int y = 0; y < 8; y++) s += cs[v][y] * t[8*y+u];
        c[8*v+u] = rnd(s);
        if (c[8*v+u] > 2047)  c[8*v+u] = 2047;
        if (c[8*v+u] < -2048) c[8*v+u] = -2048;
      end
  endfunction

  function automatic void idct(input int c[64], output int p[64]);
    real t [64];
    for (int v = 0; v < 8; v++)
      for (int x = 0; x < 8; x++) begin
        t[8*v+x] = 0.0;
        for (int u = 0; u < 8; u++) t[8*v+x] += cs[u][x] * real'(c[8*v+u]);
      end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        real s;
        s = 0.0;
        for (int v = 0; v < 8; v++) s += cs[v][y] * t[8*v+x];
        p[8*y+x] = rnd(s);
        if (p[8*y+x] > 255)  p[8*y+x] = 255;
        if (p[8*y+x] < -256) p[8*y+x] = -256;
      end
  endfunction

  // checker: outputs leave column by column
  always @(posedge clk) if (rst_n && ready) begin
    int b, k, r, c, e;
    b = nout / 64; k = nout % 64; c = k / 8; r = k % 8;
    e = int'($signed(dout)) - refp[b][8*r+c];
    err_sum[8*r+c] += e;
    err_sq[8*r+c]  += e * e;
    if ((e < 0 ? -e : e) > err_pk[8*r+c]) err_pk[8*r+c] = (e < 0 ? -e : e);
    nout++;
  end

  task automatic run_set(input int lo, input int hi, input int sgn);
    int  pix [64];
    int  c [64];
    int  p [64];
    real omse, ome, worst_mse, worst_me;
    randx = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < 64; k++) pix[k] = sgn * ieee_rand(lo, hi);
      fdct(pix, c);
      idct(c, p);
      for (int k = 0; k < 64; k++) begin coef[b][k] = c[k]; refp[b][k] = p[k]; end
    end
    for (int k = 0; k < 64; k++) begin err_sum[k] = 0; err_sq[k] = 0; err_pk[k] = 0; end
    nout = 0;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int t = 0; t < 10; t++) begin
          start <= (r == 0 && t == 0);
          din   <= (t < 8) ? 12'(coef[b][8*r+t]) : 12'h0;
          @(posedge clk);
        end
    start <= 1'b0;
    din   <= '0;
    wait (nout == 64 * NBLK);
    @(posedge clk);
    omse = 0.0; ome = 0.0; worst_mse = 0.0; worst_me = 0.0;
    for (int k = 0; k < 64; k++) begin
      real mse, me;
      mse = real'(err_sq[k]) / NBLK;
      me  = real'(err_sum[k]) / NBLK;
      omse += mse / 64.0;
      ome  += me / 64.0;
      if (mse > worst_mse) worst_mse = mse;
      if ((me < 0 ? -me : me) > worst_me) worst_me = (me < 0 ? -me : me);
      checks += 3;
      if (err_pk[k] > 1)                  begin failures++; $display("FAIL L=%0d H=%0d sign %0d: ppe(%0d,%0d) = %0d", lo, hi, sgn, k/8, k%8, err_pk[k]); end
      if (mse > 0.06)                     begin failures++; $display("FAIL L=%0d H=%0d sign %0d: pmse(%0d,%0d) = %f", lo, hi, sgn, k/8, k%8, mse); end
      if (me > 0.015 || me < -0.015)      begin failures++; $display("FAIL L=%0d H=%0d sign %0d: pme(%0d,%0d) = %f", lo, hi, sgn, k/8, k%8, me); end
    end
    checks += 2;
    if (omse > 0.02)                  begin failures++; $display("FAIL L=%0d H=%0d sign %0d: omse = %f", lo, hi, sgn, omse); end
    if (ome > 0.0015 || ome < -0.0015) begin failures++; $display("FAIL L=%0d H=%0d sign %0d: ome = %f", lo, hi, sgn, ome); end
    $display("IEEE 1180 L=%0d H=%0d sign %0d: worst pmse %f, omse %f, worst |pme| %f, ome %f",
             lo, hi, sgn, worst_mse, omse, worst_me, ome);
  endtask

  initial begin
    int z [64];
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        cs[u][x] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2*x+1) * u * PI / 16.0);
    start = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    run_set(256, 255, 1);
    run_set(256, 255, -1);
    run_set(5, 5, 1);
    run_set(5, 5, -1);
    run_set(300, 300, 1);
    run_set(300, 300, -1);
    // all-zero block
    for (int b = 0; b < NBLK; b++) for (int k = 0; k < 64; k++) begin coef[b][k] = 0; refp[b][k] = 0; end
    nout = 0;
    for (int k = 0; k < 64; k++) err_pk[k] = 0;
    for (int t = 0; t < 80; t++) begin
      start <= (t == 0); din <= '0;
      @(posedge clk);
    end
    start <= 1'b0;
    wait (nout == 64);
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (err_pk[k] != 0) begin failures++; $display("FAIL: zero block gives nonzero output at %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * NBLK * 80 + 2000) @(posedge clk);
    failures++;
    $display("tb_idct2d_ieee1180: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
