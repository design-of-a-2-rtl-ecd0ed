// tb_idct_ctrl: test of the 2-D IDCT control block with a cycle model of
// the row core (results x(0..7) 16..23 cycles after each row load).
//
// Blocks are started back to back (every 80 cycles) and after idle gaps.
// Checked: 64 row writes per block in the 8-on/2-off pattern starting with
// START, eight row loads; every memory read returns the element the column
// core needs next (column by column, row 0 first), written by the same
// block and not yet overwritten by the next one; both address patterns
// occur; each column write follows its memory read by one cycle; a column
// load follows every eighth column write.
module tb_idct_ctrl;
  localparam int NB = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, row_we, row_load, row_valid, ram_we, ram_re, col_we, col_load;
  logic [2:0] row_idx;
  logic [5:0] ram_waddr, ram_raddr;
  int checks = 0, failures = 0;

  idct_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start),
    .row_we(row_we), .row_load(row_load), .row_valid(row_valid), .row_idx(row_idx),
    .ram_we(ram_we), .ram_waddr(ram_waddr), .ram_re(ram_re), .ram_raddr(ram_raddr),
    .col_we(col_we), .col_load(col_load));

  always #5 clk = ~clk;

  // row core model
  logic [23:0] lp;
  always_ff @(posedge clk) lp <= {lp[22:0], row_load};
  always_comb begin
    row_valid = 1'b0; row_idx = '0;
    for (int i = 0; i < 8; i++) if (lp[15+i]) begin row_valid = 1'b1; row_idx = 3'(i); end
  end

  // memory tag model: which block/row/column each word holds
  int tag [64];
  int wr_blk = 0, wr_row = 0, rd_blk = 0, rd_n = 0, nwe = 0, nload = 0, ncwe = 0, ncld = 0;
  int n_par [2];
  int in_cnt = -1;
  logic re_d = 0;

  always @(posedge clk) if (rst_n) begin
    // input pattern: cycle n after START: write if n%10 < 8, load if n%10 == 8
    if (start) in_cnt = 0; else if (in_cnt >= 0) in_cnt++;
    if (in_cnt >= 80) in_cnt = -1;
    checks++;
    if (row_we != (in_cnt >= 0 && in_cnt % 10 < 8) || row_load != (in_cnt >= 0 && in_cnt % 10 == 8)) begin
      failures++;
      if (failures < 10) $display("FAIL input pattern at %0d: we=%0b load=%0b", in_cnt, row_we, row_load);
    end
    if (row_we) nwe++;
    if (ram_we) begin
      tag[ram_waddr] = 64 * wr_blk + 8 * wr_row + int'(row_idx);
      n_par[ram_waddr == {wr_row[2:0], row_idx} ? 0 : 1]++;
      if (row_idx == 7) begin wr_row++; if (wr_row == 8) begin wr_row = 0; wr_blk++; end end
    end
    if (ram_re) begin
      int k, r;
      k = rd_n / 8; r = rd_n % 8;
      checks++;
      if (tag[ram_raddr] != 64 * rd_blk + 8 * r + k) begin
        failures++;
        if (failures < 10) $display("FAIL read block %0d col %0d row %0d: word holds tag %0d", rd_blk, k, r, tag[ram_raddr]);
      end
      rd_n++;
      if (rd_n == 64) begin rd_n = 0; rd_blk++; end
    end
    checks++;
    if (col_we != re_d) begin failures++; $display("FAIL col_we not one cycle after read"); end
    re_d = ram_re;
    if (col_we) ncwe++;
    if (col_load) begin
      checks++;
      ncld++;
      if (ncwe != 8 * ncld) begin failures++; $display("FAIL col_load after %0d writes", ncwe); end
    end
  end

  initial begin
    start = 0;
    for (int a = 0; a < 64; a++) tag[a] = -1;
    n_par[0] = 0; n_par[1] = 0;
    lp = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      if (b % 9 == 8) repeat (int'($urandom_range(1, 50))) @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      repeat (79) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks += 4;
    if (nwe != 64 * NB)  begin failures++; $display("FAIL %0d row writes", nwe); end
    if (rd_blk != NB)    begin failures++; $display("FAIL %0d blocks read", rd_blk); end
    if (ncld != 8 * NB)  begin failures++; $display("FAIL %0d column loads", ncld); end
    if (n_par[0] == 0 || n_par[1] == 0) begin failures++; $display("FAIL address patterns %0d/%0d", n_par[0], n_par[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 90 + 1000) @(posedge clk);
    failures++;
    $display("tb_idct_ctrl: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
