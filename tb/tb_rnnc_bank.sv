// tb_rnnc_bank: test of the converter bank and output multiplexer.
//
// Eight random digit streams (10-digit words whose values stay below 2^17,
// every third word large enough to drive saturation) are fed back to back; `capture` follows each
// word's last digit. The eight results must then leave one per cycle, in
// order, with `dout_valid` and `dout_idx`, each equal to the word's value
// saturated to 16 bits. Saturation must occur in both directions.
module tb_rnnc_bank;
  import idct_pkg::*;
  localparam int NF = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic first, capture;
  r4_t  xr [8];
  logic [15:0] dout;
  logic dout_valid;
  logic [2:0] dout_idx;
  int   expq [$];
  int checks = 0, failures = 0, n_satp = 0, n_satn = 0;

  rnnc_bank dut (.clk(clk), .rst_n(rst_n), .first(first), .capture(capture), .xr(xr),
    .dout(dout), .dout_valid(dout_valid), .dout_idx(dout_idx));

  always #5 clk = ~clk;

  initial begin
    first = 0; capture = 0;
    for (int i = 0; i < 8; i++) xr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      int v [8];
      for (int i = 0; i < 8; i++) v[i] = 0;
      for (int j = 0; j < 10; j++) begin
        for (int i = 0; i < 8; i++) begin
          r4_t d;
          d = r4_t'($urandom_range(0, 255));
          if (j == 0 || (j == 1 && f % 3 != 0)) d = '0;
          if (j == 1) d.hi = '0;        // keep |value| below 2^17
          v[i] = 4 * v[i] + r4_val(d);
          xr[i] <= d;
        end
        first   <= (j == 0);
        capture <= (j == 0) && (f > 0);
        @(posedge clk);
      end
      for (int i = 0; i < 8; i++) begin
        if (v[i] > 32767)  begin v[i] = 32767;  n_satp++; end
        if (v[i] < -32768) begin v[i] = -32768; n_satn++; end
        expq.push_back(v[i]);
      end
    end
    for (int i = 0; i < 8; i++) xr[i] <= '0;
    first <= 0; capture <= 1;
    @(posedge clk);
    capture <= 0;
    repeat (12) @(posedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    if (n_satp == 0 || n_satn == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: after each capture, eight consecutive valid words
  int idx = 0;
  always @(posedge clk) if (rst_n && dout_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    if ($signed(dout) != e || dout_idx != 3'(idx)) begin
      failures++;
      if (failures < 10) $display("FAIL: word %0d = %0d idx %0d, expected %0d idx %0d", idx, $signed(dout), dout_idx, e, idx);
    end
    idx = (idx + 1) % 8;
  end

  initial begin
    repeat (NF * 10 + 100) @(posedge clk);
    failures++;
    $display("tb_rnnc_bank: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
