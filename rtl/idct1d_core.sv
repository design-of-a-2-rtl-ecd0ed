// idct1d_core: one 8-point 1-D IDCT processor (row or column core).
//
// Data flow: a parallel-in serial-out register collects eight coefficients
// X(0)..X(7) and serialises them two bits per cycle; six DA-CORDIC rotators
// perform the rotations of the fast IDCT factorisation
//   pi/4  on (X0, X4)     pi/8 on (X6, X2)     3pi/16 on (X5, X3)
//   pi/16 on (X3, X5)     3pi/16 on (X1, X7)   pi/16 on (X7, X1)
// each scaled by 1/2; a two-stage butterfly of on-line adders combines the
// twelve results into x(0)..x(7) digit-serially; and eight on-the-fly
// converters turn the redundant digit streams into two's complement words,
// which leave one per cycle. The whole datapath between the serialiser and
// the converters works most significant digit first in radix-4 signed
// digits, so no carry propagates until the final conversion.
//
// Number scaling: an input word is read as a fraction p = X / 2^(IN_W-1)
// (IN_W <= 16; narrower words are padded with zero bits at the bottom).
// Output word i (OUT_W bits, two's complement) equals
//   x(i) = 1/2 * sum_u C(u) X(u) cos((2i+1) u pi / 16),  C(0) = 1/sqrt(2),
// computed on p and expressed in units of 2^-14, within the rounding of the
// ROM words (about +-3 units), and saturated to the OUT_W-bit range (|x| < 2).
//
// Digit frame: each accumulator runs for nine cycles per word, the ninth
// with a zero input digit, so that it also emits the digit held in its
// remainder. Its first digit is always zero (one ROM word is less than one
// eighth of the window), so the ten-position frame of a word is: one idle
// zero, the zero first digit, eight significant digits. The two leading
// zeros are the headroom of the two on-line adder stages.
//
// Interface and timing: write the eight coefficients with `din_we`, X(0)
// first, one per cycle, then pulse `load` (it may follow the eighth write
// directly). Loads must be at least FRAME = 10 cycles apart; with one load
// every ten cycles the core sustains 8 results per 10 cycles. For a load in
// cycle L, results x(0)..x(7) appear on `dout` in cycles L+16 .. L+23, with
// `dout_valid` high and `dout_idx` = i. The rotator assignment, the
// two-bits-per-cycle serialisation and the structure follow the design; the
// frame of ten cycles, the extra remainder digit and the exact pipeline
// timing are this implementation's choices.
//
// Lint: the assertions use `disable iff (!rst_n)` with the asynchronous
// reset, which verilator reports as a sync/async net mix (SYNCASYNCNET);
// this is checking code only and does not change the circuit.
module idct1d_core
  import idct_pkg::*;
#(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned ROM_W = 14,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  input  logic             din_we,
  input  logic             load,
  output logic [OUT_W-1:0] dout,
  output logic             dout_valid,
  output logic [2:0]       dout_idx
);
  localparam int unsigned LAT = FRAME + 5;   // load to converters complete

  logic [1:0] xs [8];
  logic       lpipe [1:LAT];                // delayed copies of `load`
  logic       en, first_digit, rnnc_first, capture;
  r4_t        a00, b00, a02, b02, a03, b03, a13, b13, a01, b01, a11, b11;
  r4_t        xr [8];

  piso_reg #(.IN_W(IN_W), .SER_W(SER_W)) u_piso (
    .clk(clk), .rst_n(rst_n), .din(din), .din_we(din_we), .load(load), .xs(xs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= LAT; k++) lpipe[k] <= 1'b0;
    end else begin
      lpipe[1] <= load;
      for (int k = 2; k <= LAT; k++) lpipe[k] <= lpipe[k-1];
    end
  end

  always_comb begin
    first_digit = lpipe[1];
    en          = 1'b0;
    for (int k = 1; k <= NDIG + 1; k++) en |= lpipe[k];
    rnnc_first  = lpipe[5];
    capture     = lpipe[LAT];
  end

  // p operand, q operand: (p', q') = rotated pair
  da_rotator #(.ANGLE(ANG_PI_4),   .ROM_W(ROM_W)) u_r0 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[0]), .xs_q(xs[4]), .xc_p(b00), .xc_q(a00));
  da_rotator #(.ANGLE(ANG_PI_8),   .ROM_W(ROM_W)) u_r1 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[6]), .xs_q(xs[2]), .xc_p(b02), .xc_q(a02));
  da_rotator #(.ANGLE(ANG_3PI_16), .ROM_W(ROM_W)) u_r2 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[5]), .xs_q(xs[3]), .xc_p(b03), .xc_q(a03));
  da_rotator #(.ANGLE(ANG_PI_16),  .ROM_W(ROM_W)) u_r3 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[3]), .xs_q(xs[5]), .xc_p(b13), .xc_q(a13));
  da_rotator #(.ANGLE(ANG_3PI_16), .ROM_W(ROM_W)) u_r4 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[1]), .xs_q(xs[7]), .xc_p(b01), .xc_q(a01));
  da_rotator #(.ANGLE(ANG_PI_16),  .ROM_W(ROM_W)) u_r5 (.clk(clk), .rst_n(rst_n),
    .en(en), .first_digit(first_digit), .xs_p(xs[7]), .xs_q(xs[1]), .xc_p(b11), .xc_q(a11));

  butterfly_array u_bfly (
    .clk(clk), .rst_n(rst_n),
    .a00(a00), .b00(b00), .a02(a02), .b02(b02), .a03(a03), .b03(b03),
    .a13(a13), .b13(b13), .a01(a01), .b01(b01), .a11(a11), .b11(b11),
    .xr(xr)
  );

  rnnc_bank #(.OUT_W(OUT_W)) u_bank (
    .clk(clk), .rst_n(rst_n), .first(rnnc_first), .capture(capture), .xr(xr),
    .dout(dout), .dout_valid(dout_valid), .dout_idx(dout_idx)
  );

  a_load_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !(lpipe[1] || lpipe[2] || lpipe[3] || lpipe[4] || lpipe[5]
               || lpipe[6] || lpipe[7] || lpipe[8] || lpipe[9]))
    else $error("idct1d_core: loads closer than %0d cycles", FRAME);
endmodule
