// tb_selftest_harness: self-checking test of the built-in self-test
// harness around the 2-D IDCT processor.
//
// Fills RAM-T with a random coefficient block and checks the replay: START
// must coincide with coefficient 0 on DIN, and every DIN word the processor
// takes must be the RAM-T word for its position. The 64 processor results
// seen during a first run are checked against a double-precision 2-D IDCT
// (tolerance 5, as for the processor's own test) and recorded. They are
// then written into RAM-E and the test is run again, which must end with
// test_done and COMP_RES high after exactly 64 comparisons. A third run
// with one RAM-E word changed must end with COMP_RES low. Each run must
// finish within 200 cycles of TEST_START. The harness mechanisms are
// counted (words replayed from RAM-T, words compared, passing and failing
// verdicts) and one that never happened counts as a failure. A watchdog
// ends the test. All parameters are at their defaults, so this is also the
// full-size run of the whole FPGA design (harness plus processor); the
// processor's own mechanisms are counted by tb_idct2d_top.
module tb_selftest_harness;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        test_start = 1'b0;
  logic        t_we = 1'b0, e_we = 1'b0;
  logic [5:0]  t_addr = '0, e_addr = '0;
  logic [11:0] t_data = '0;
  logic [8:0]  e_data = '0;
  logic        test_done, comp_res;
  int checks = 0, failures = 0;

  selftest_harness dut (
    .clk(clk), .rst_n(rst_n), .test_start(test_start),
    .t_we(t_we), .t_addr(t_addr), .t_data(t_data),
    .e_we(e_we), .e_addr(e_addr), .e_data(e_data),
    .test_done(test_done), .comp_res(comp_res)
  );

  always #5 clk = ~clk;

  int  coef [64];
  int  got  [64];
  int  nrd;          // results seen in this run
  int  nin;          // coefficients taken by the processor
  int  n_replay = 0, n_cmp = 0, n_pass = 0, n_fail = 0;
  real cs [8][8];

  // coefficients the processor writes into its row PISO, in order
  always @(posedge clk) if (rst_n && dut.u_dut.u_ctrl.row_we) begin
    checks++;
    if (nin < 64 && int'($signed(dut.din)) != coef[nin]) begin
      failures++;
      $display("FAIL: DIN word %0d = %0d, RAM-T holds %0d", nin, $signed(dut.din), coef[nin]);
    end
    nin++;
    n_replay++;
  end

  // START aligned with coefficient 0
  always @(posedge clk) if (rst_n && dut.start_q) begin
    checks++;
    if (int'($signed(dut.din)) != coef[0]) begin
      failures++;
      $display("FAIL: START with DIN = %0d, expected %0d", $signed(dut.din), coef[0]);
    end
  end

  always @(posedge clk) if (rst_n && dut.ready) begin
    if (nrd < 64) got[nrd] = int'($signed(dut.dout));
    nrd++;
    n_cmp++;
  end

  task automatic run_test(output int cycles);
    nrd = 0; nin = 0;
    @(posedge clk) test_start <= 1'b1;
    @(posedge clk) test_start <= 1'b0;
    @(posedge clk);                     // test_done is cleared by now
    cycles = 2;
    while (!test_done && cycles < 400) begin @(posedge clk); cycles++; end
    repeat (2) @(posedge clk);
    if (test_done && comp_res)  n_pass++;
    if (test_done && !comp_res) n_fail++;
  endtask

  initial begin
    int cyc;
    real acc;
    int  r, c, exp_v, e;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        cs[u][x] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2*x+1) * u * PI / 16.0);
    for (int k = 0; k < 64; k++) begin
      coef[k] = int'($urandom_range(0, 600)) - 300;
      if (k > 20) coef[k] = coef[k] / 8;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 64; k++) begin
      @(posedge clk);
      t_we <= 1'b1; t_addr <= 6'(k); t_data <= 12'(coef[k]);
      e_we <= 1'b1; e_addr <= 6'(k); e_data <= '0;
    end
    @(posedge clk) begin t_we <= 1'b0; e_we <= 1'b0; end

    // run 1: check the processor's results against the reference
    run_test(cyc);
    checks++;
    if (!test_done || cyc > 200) begin failures++; $display("FAIL: run 1 did not finish (%0d cycles)", cyc); end
    checks++;
    if (nin != 64) begin failures++; $display("FAIL: %0d coefficients taken, expected 64", nin); end
    for (int k = 0; k < 64; k++) begin
      c = k / 8; r = k % 8;   // output order: column by column
      acc = 0.0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++)
          acc += cs[u][r] * cs[v][c] * real'(coef[8*u+v]);
      exp_v = int'(acc);
      if (exp_v > 255) exp_v = 255;
      if (exp_v < -256) exp_v = -256;
      e = got[k] - exp_v;
      checks++;
      if (e > 5 || e < -5) begin failures++; $display("FAIL: result %0d = %0d, reference %0d", k, got[k], exp_v); end
    end

    // run 2: RAM-E holds the results, the comparator must pass
    for (int k = 0; k < 64; k++) begin
      @(posedge clk);
      e_we <= 1'b1; e_addr <= 6'(k); e_data <= 9'(got[k]);
    end
    @(posedge clk) e_we <= 1'b0;
    run_test(cyc);
    checks++;
    if (!(test_done && comp_res)) begin failures++; $display("FAIL: run 2 done=%0d comp_res=%0d", test_done, comp_res); end
    checks++;
    if (nrd != 64 || dut.n_cmp != 7'd64) begin failures++; $display("FAIL: run 2 %0d results, %0d compared", nrd, dut.n_cmp); end
    checks++;
    if (cyc > 200) begin failures++; $display("FAIL: run 2 took %0d cycles", cyc); end

    // run 3: one expected word wrong, the comparator must fail
    @(posedge clk) begin e_we <= 1'b1; e_addr <= 6'd37; e_data <= 9'(got[37] + 1); end
    @(posedge clk) e_we <= 1'b0;
    run_test(cyc);
    checks++;
    if (!(test_done && !comp_res)) begin failures++; $display("FAIL: run 3 done=%0d comp_res=%0d", test_done, comp_res); end

    $display("mechanisms: replay %0d compare %0d pass %0d fail %0d", n_replay, n_cmp, n_pass, n_fail);
    checks += 4;
    if (n_replay == 0) begin failures++; $display("FAIL: no RAM-T replay"); end
    if (n_cmp == 0)    begin failures++; $display("FAIL: no comparison"); end
    if (n_pass == 0)   begin failures++; $display("FAIL: no passing verdict"); end
    if (n_fail == 0)   begin failures++; $display("FAIL: no failing verdict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("tb_selftest_harness: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
