// tb_idct1d_core: self-checking testbench of one 1-D IDCT core.
//
// Streams random and extreme coefficient vectors through the core at the
// full rate (one load every 10 cycles) and compares each output word with a
// double-precision 1-D IDCT, x(i) = 1/2 sum C(u) X(u) cos((2i+1)u pi/16),
// of the input fractions, in units of 2^-14. It also checks the latency
// (load to first result = 16 cycles), the output order and that eight
// results leave per ten cycles.
module tb_idct1d_core;
  import idct_pkg::*;

  localparam int IN_W  = 12;
  localparam int OUT_W = 16;
  localparam int NVEC  = 600;
  localparam real TOL  = 28.0;   // units of 2^-14, ROM_W = 14

  logic clk = 1'b0, rst_n = 1'b0;
  logic [IN_W-1:0]  din;
  logic             din_we, load;
  logic [OUT_W-1:0] dout;
  logic             dout_valid;
  logic [2:0]       dout_idx;

  int checks = 0, failures = 0;
  real maxerr = 0.0;

  idct1d_core #(.IN_W(IN_W)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .din_we(din_we), .load(load),
    .dout(dout), .dout_valid(dout_valid), .dout_idx(dout_idx)
  );

  always #5 clk = ~clk;

  int  vec [NVEC][8];
  real expv [NVEC][8];
  int  load_cycle [NVEC];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real idct_ref(input int x[8], input int i);
    real s = 0.0;
    for (int u = 0; u < 8; u++) begin
      real c = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
      s += c * (real'(x[u]) / real'(1 << (IN_W-1))) * $cos((2*i+1) * u * 3.14159265358979 / 16.0);
    end
    s = 0.5 * s * 16384.0;
    if (s > 32767.0)  s = 32767.0;    // the core saturates to 16 bits
    if (s < -32768.0) s = -32768.0;
    return s;
  endfunction

  // stimulus
  initial begin
    din = '0; din_we = 1'b0; load = 1'b0;
    for (int n = 0; n < NVEC; n++)
      for (int u = 0; u < 8; u++) begin
        int r;
        r = int'($urandom_range(0, 9));
        if (n < 4)        vec[n][u] = (n == 0) ? -2048 : (n == 1) ? 2047 :
                                      (n == 2) ? ((u % 2) ? -2048 : 2047) : ((u < 4) ? 2047 : -2048);
        else if (r == 0)  vec[n][u] = -2048;
        else if (r == 1)  vec[n][u] = 2047;
        else if (r < 4)   vec[n][u] = int'($urandom_range(0, 64)) - 32;
        else              vec[n][u] = int'($urandom_range(0, 4095)) - 2048;
      end
    for (int n = 0; n < NVEC; n++)
      for (int i = 0; i < 8; i++) expv[n][i] = idct_ref(vec[n], i);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NVEC; n++) begin
      for (int t = 0; t < 10; t++) begin
        din_we <= (t < 8);
        din    <= (t < 8) ? IN_W'(vec[n][t]) : '0;
        load   <= (t == 8);
        if (t == 8) load_cycle[n] = cycle + 1;
        @(posedge clk);
      end
    end
    din_we <= 1'b0; load <= 1'b0;
  end

  // checker
  initial begin
    int n, i;
    n = 0; i = 0;
    wait (rst_n);
    while (n < NVEC) begin
      @(posedge clk);
      if (dout_valid) begin
        real got, err;
        got = real'($signed(dout));
        err = got - expv[n][i];
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > TOL || dout_idx != 3'(i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL vec %0d x(%0d): got %0.1f expected %0.2f idx %0d", n, i, got, expv[n][i], dout_idx);
        end
        if (i == 0) begin
          checks++;
          if (cycle - load_cycle[n] != 16) begin
            failures++;
            $display("FAIL latency vec %0d: %0d cycles", n, cycle - load_cycle[n]);
          end
        end
        i++;
        if (i == 8) begin i = 0; n++; end
      end
    end
    $display("tb_idct1d_core: %0d vectors, max error %0.2f LSB (2^-14)", NVEC, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 10 + 200) @(posedge clk);
    failures++;
    $display("tb_idct1d_core: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
