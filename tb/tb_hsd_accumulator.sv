// tb_hsd_accumulator: random test of the hybrid signed-digit accumulator.
//
// Words of nine steps (first step with `first`, last with a zero ROM word)
// follow each other without gaps, and every tenth word is followed by an idle
// cycle with `en` low. Each step adds or subtracts a random word below one
// eighth of the window. The output digits of a word, weighted 4^-(k+1),
// must equal sum_k (+-O_k) 4^-k / 2^ROM_W to within the dropped remainder
// (less than one unit of the last digit), and appear one cycle after their
// step; while `en` is low the output is zero. The first digit must be zero, and the GUARD recoding must occur.
module tb_hsd_accumulator;
  import idct_pkg::*;
  localparam int W = 14;
  localparam int NW = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, aors;
  logic [W-1:0] o;
  r4_t dout;
  int checks = 0, failures = 0, n_recode = 0;

  hsd_accumulator #(.ROM_W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .first(first),
    .aors(aors), .o(o), .dout(dout));

  always #5 clk = ~clk;
  always @(posedge clk) if (en && dut.rem != 0) n_recode++;

  initial begin
    en = 0; first = 0; aors = 0; o = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < NW; w++) begin
      real exact, got;
      exact = 0.0; got = 0.0;
      for (int k = 0; k < ((w % 10 == 9) ? 10 : 9); k++) begin
        logic [W-1:0] ov;
        logic         sv;
        ov = (k < 8) ? W'($urandom_range(0, (1 << (W - 3)) - 1)) : '0;
        if (w % 5 == 0 && k < 8) ov = W'((1 << (W - 3)) - 1);
        sv = 1'($urandom_range(0, 1));
        if (k < 9) begin
          en <= 1; first <= (k == 0); aors <= sv; o <= ov;
          exact += (sv ? -1.0 : 1.0) * real'(ov) / real'(1 << W) / (4.0 ** k);
        end else begin
          en <= 0; first <= 0; aors <= 0; o <= '0;
        end
        @(posedge clk);
        // the digit of step k is on dout now (registered at this edge)
        #1;
        if (k <= 8) begin
          got += real'(r4_val(dout)) / (4.0 ** (k + 1));
          if (k == 0) begin
            checks++;
            if (r4_val(dout) != 0) begin failures++; $display("FAIL word %0d: first digit %0d", w, r4_val(dout)); end
          end
        end else if (w % 10 == 9) begin
          checks++;
          if (dout != '0) begin failures++; $display("FAIL: output not zero while idle"); end
        end
      end
      checks++;
      if (got - exact > 1.0 / (4.0 ** 9) || exact - got > 1.0 / (4.0 ** 9)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: digits %g exact %g", w, got, exact);
      end
    end
    checks++;
    if (n_recode == 0) begin failures++; $display("FAIL: no GUARD recoding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * 12 + 100) @(posedge clk);
    failures++;
    $display("tb_hsd_accumulator: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
