// hsd_accumulator: hybrid radix-2 signed-digit accumulator of a DA rotator,
// working most significant digit first.
//
// The shifter holds a window E of ROM_W binary signed digits e1..eW (value
// sum e_i 2^-i). Each active cycle the unsigned ROM word O = o1..oW is added
// to (AorS = 0) or subtracted from (AorS = 1) the window by a row of PPM
// cells. The transfer between neighbouring positions moves one place only,
// so the addition is carry-free; the transfer out of position 1 becomes an
// integer digit s0. The GUARD logic then takes the four leading digits
// s0..s4 (value V in quarters of an output digit), emits the output radix-4
// digit d = V/4 rounded half toward zero (|d| <= 3) and rewrites s3, s4 so
// that they hold the remainder V - 4d (-2..2 quarters). The remaining digits
// are shifted left by two places and two zero digits are appended.
//
// Range argument (this implementation's): the window stays below 3/4 and
// every ROM word is below 1/8 of the window, so |S| < 7/8, |V| <= 14 quarters
// and the remainder keeps the window below 3/4. The design states that the
// ROM words carry two leading zeros and that GUARD recodes the four leading
// digits to prevent overflow; the rounding rule is this implementation's.
//
// Subtraction is done by negating the window (exchanging the components of
// every digit), adding O and negating the sum, which keeps the PPM row
// unchanged. The figure of this block shows a multiplexer on each ROM bit
// driven by AorS; this is one way to realise that selection.
//
// Timing: when `first` is high the window is taken as zero (new word). When
// `en` is low the window is cleared and the output digit is zero. The output
// digit is registered: digit k leaves one cycle after input digit k.
//
// Lint: the assertions use `disable iff (!rst_n)` with the asynchronous
// reset, which verilator reports as a sync/async net mix (SYNCASYNCNET);
// this is checking code only and does not change the circuit.
module hsd_accumulator
  import idct_pkg::*;
#(
  parameter int unsigned ROM_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,     // a ROM word is to be accumulated
  input  logic             first,  // first (most significant) digit of a word
  input  logic             aors,   // 0: add, 1: subtract
  input  logic [ROM_W-1:0] o,      // ROM word, o1 = MSB
  output r4_t              dout    // two most significant digits, registered
);
  localparam int W = int'(ROM_W);

  bsd_t e    [1:W];   // shifter contents
  bsd_t ein  [1:W];
  bsd_t s    [1:W];
  bsd_t enx  [1:W];
  logic t    [1:W];
  logic u    [1:W];
  int   s0;           // integer digit of the sum
  int   v;            // value of s0..s4 in quarters of an output digit
  int   d;            // output radix-4 digit
  int   rem;          // v - 4*d
  r4_t  dnext;

  for (genvar i = 1; i <= W; i++) begin : g_ppm
    ppm_cell u_ppm (
      .xp(ein[i].p), .xm(ein[i].m), .y(o[W-i]), .t(t[i]), .u(u[i])
    );
  end

  always_comb begin
    // operand selection: window or its negation, zero at a new word
    for (int i = 1; i <= W; i++) begin
      ein[i] = first ? '0 : e[i];
      if (aors) ein[i] = bsd_neg(ein[i]);
    end
    // sum digits s_i = t_{i+1} - u_i, sign restored for subtraction
    for (int i = 1; i <= W; i++) begin
      s[i] = '{p: (i < W) ? t[(i < W) ? i + 1 : W] : 1'b0, m: u[i]};
      if (aors) s[i] = bsd_neg(s[i]);
    end
    s0 = aors ? -int'(t[1]) : int'(t[1]);

    // GUARD: choose the output digit and recode the remainder
    v   = 16 * s0 + 8 * bsd_val(s[1]) + 4 * bsd_val(s[2])
        + 2 * bsd_val(s[3]) + bsd_val(s[4]);
    d   = (v >= 0) ? ((v + 1) / 4) : -((-v + 1) / 4);
    rem = v - 4 * d;
    case (d)
      3:       dnext = '{hi: '{1'b1, 1'b0}, lo: '{1'b1, 1'b0}};
      2:       dnext = '{hi: '{1'b1, 1'b0}, lo: '{1'b0, 1'b0}};
      1:       dnext = '{hi: '{1'b0, 1'b0}, lo: '{1'b1, 1'b0}};
      -1:      dnext = '{hi: '{1'b0, 1'b0}, lo: '{1'b0, 1'b1}};
      -2:      dnext = '{hi: '{1'b0, 1'b1}, lo: '{1'b0, 1'b0}};
      -3:      dnext = '{hi: '{1'b0, 1'b1}, lo: '{1'b0, 1'b1}};
      default: dnext = '0;
    endcase

    // next window: recoded s3', s4', then s5..sW, two zero digits appended
    for (int i = 1; i <= W; i++) enx[i] = '0;
    case (rem)
      2:       begin enx[1] = '{1'b1, 1'b0}; enx[2] = '0;             end
      1:       begin enx[1] = '0;             enx[2] = '{1'b1, 1'b0}; end
      -1:      begin enx[1] = '0;             enx[2] = '{1'b0, 1'b1}; end
      -2:      begin enx[1] = '{1'b0, 1'b1}; enx[2] = '0;             end
      default: begin enx[1] = '0;             enx[2] = '0;             end
    endcase
    for (int i = 3; i <= W - 2; i++) enx[i] = s[i+2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= W; i++) e[i] <= '0;
      dout <= '0;
    end else if (en) begin
      for (int i = 1; i <= W; i++) e[i] <= enx[i];
      dout <= dnext;
    end else begin
      for (int i = 1; i <= W; i++) e[i] <= '0;
      dout <= '0;
    end
  end

  // The range argument above: the leading digits never exceed +-14 quarters.
  a_guard_range: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (v <= 14 && v >= -14))
    else $error("hsd_accumulator: GUARD range exceeded (v=%0d)", v);

  // The first digit of a word carries at most one ROM word (< 1/8 of the
  // window), so it is always zero: the rotators' streams start with a zero.
  a_first_digit_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (en && first) |-> d == 0)
    else $error("hsd_accumulator: nonzero first digit");
endmodule
