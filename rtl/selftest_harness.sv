// selftest_harness: built-in self-test of the 2-D IDCT processor, meant to
// sit in the same FPGA as the processor (no fast external test equipment
// needed).
//
// Parts: RAM-T holds one 8x8 block of test coefficients, RAM-E the 64
// expected results; the test control logic replays RAM-T into the
// processor (DUT) when TEST_START is pulsed; the comparator checks every
// DOUT word flagged by READY against RAM-E and drives COMP_RES (the LED):
// high once all 64 results have arrived and none differed.
//
// Interface and timing: pulse `test_start` for one cycle. The control
// logic then reads RAM-T at ADDR_IN = 0..63, eight addresses in consecutive
// cycles and two idle cycles per row (the processor's input schedule), and
// raises START together with the first coefficient on DIN (RAM-T has one
// cycle of read latency, so START is the read enable of address 0 delayed
// by one cycle). Each READY word is compared with RAM-E at ADDR_OUT, which
// then advances; RAM-E must hold the results in the processor's output
// order (column by column). `test_done` rises after the 64th comparison
// and `comp_res` = test_done and no mismatch. Both stay until the next
// `test_start`. The RAMs are filled through the `t_*` and `e_*` write ports
// before the test.
//
// Follows the design: the four parts, the signal names TEST_START, START,
// ADDR_IN, DIN, READY, DOUT, ADDR_OUT, DOUT_EXP and COMP_RES and the
// sequence (replay on TEST_START, comparison triggered by READY, LED on if
// no error). This design's choices: one clock (the original clocks the
// processor from the complement of the test clock), write ports to fill
// the RAMs (the original preloads them), RAM-E read combinationally so
// DOUT_EXP matches DOUT in the same cycle, a test of a single block, and
// the test_done flag.
//
// Lint: the processor's assertions use `disable iff (!rst_n)` with the
// asynchronous reset, reported as a sync/async net mix (SYNCASYNCNET); this
// is checking code only and does not change the circuit.
module selftest_harness
  import idct_pkg::*;
#(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 9,
  parameter int unsigned ROM_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_start,   // TEST_START (user switch)
  input  logic             t_we,         // fill RAM-T
  input  logic [5:0]       t_addr,
  input  logic [IN_W-1:0]  t_data,
  input  logic             e_we,         // fill RAM-E
  input  logic [5:0]       e_addr,
  input  logic [OUT_W-1:0] e_data,
  output logic             test_done,
  output logic             comp_res      // COMP_RES (LED)
);
  // ---------------- test control logic: replay of RAM-T
  logic             run;
  logic [6:0]       t;                   // position in the 80-cycle block
  logic             t_re;
  logic [5:0]       addr_in;             // ADDR_IN
  logic             start_q;             // START
  logic [IN_W-1:0]  din;                 // DIN

  always_comb begin
    t_re    = run && (t % 7'd10 < 7'd8);
    addr_in = 6'((t / 7'd10) * 7'd8 + (t % 7'd10));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      t       <= '0;
      start_q <= 1'b0;
    end else begin
      start_q <= run && (t == 0);
      if (test_start) begin
        run <= 1'b1;
        t   <= '0;
      end else if (run) begin
        if (t == 7'd79) run <= 1'b0;
        t <= t + 7'd1;
      end
    end
  end

  transpose_ram #(.DEPTH(64), .WIDTH(IN_W)) u_ram_t (
    .clk(clk), .we(t_we), .waddr(t_addr), .wdata(t_data),
    .re(t_re), .raddr(addr_in), .rdata(din)
  );

  // ---------------- device under test
  logic             ready;
  logic [OUT_W-1:0] dout;

  idct2d_top #(.IN_W(IN_W), .OUT_W(OUT_W), .ROM_W(ROM_W)) u_dut (
    .clk(clk), .rst_n(rst_n), .start(start_q), .din(din),
    .ready(ready), .dout(dout)
  );

  // ---------------- RAM-E and comparator
  logic [OUT_W-1:0] ram_e [64];
  logic [5:0]       addr_out;            // ADDR_OUT
  logic [6:0]       n_cmp;
  logic [OUT_W-1:0] dout_exp;            // DOUT_EXP
  logic             err;

  always_ff @(posedge clk) if (e_we) ram_e[e_addr] <= e_data;
  always_comb dout_exp = ram_e[addr_out];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_out  <= '0;
      n_cmp     <= '0;
      err       <= 1'b0;
      test_done <= 1'b0;
    end else if (test_start) begin
      addr_out  <= '0;
      n_cmp     <= '0;
      err       <= 1'b0;
      test_done <= 1'b0;
    end else if (ready && !test_done) begin
      if (dout != dout_exp) err <= 1'b1;
      addr_out <= addr_out + 6'd1;
      n_cmp    <= n_cmp + 7'd1;
      if (n_cmp == 7'd63) test_done <= 1'b1;
    end
  end

  assign comp_res = test_done && !err;
endmodule
