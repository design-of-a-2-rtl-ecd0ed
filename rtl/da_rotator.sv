// da_rotator: distributed-arithmetic CORDIC rotator, two bits per cycle.
//
// Computes, for one rotation angle phi and scaled by the IDCT's 1/2,
//   p' = (p*cos(phi) - q*sin(phi)) / 2      (output P, "b" terms)
//   q' = (q*cos(phi) + p*sin(phi)) / 2      (output Q, "a" terms)
// for two 16-bit two's complement fractions p and q that arrive as eight
// two-bit digits each, most significant first. Each cycle the address
// decoder turns the digit pair into a ROM address (treating the first,
// signed digit specially), the operation decoder gives each accumulator its
// add/subtract control, and two ROM accumulators (16-word ROM + hybrid
// signed-digit accumulator) add the looked-up terms, each emitting one
// radix-4 signed digit of its result per cycle, most significant first.
//
// Timing: present digit k (k = 0..7) in cycle t0+k with `first_digit` high
// at k = 0 and `en` high for all eight; result digit k appears on xc_p / xc_q
// in cycle t0+k+1. The digit emitted for k = 0 has weight 4 (in units of the
// input fraction's 1) and is always zero; each following digit has a quarter
// of the previous one's weight. Keeping `en` high for a ninth cycle with
// zero input digits emits one more digit (weight 2^-14) from the remainder,
// as the 1-D core does; what remains after the last digit is dropped. While
// `en` is low the outputs are zero digits. The single AorS line of the
// design's figure is split into one per accumulator here, because the P and
// Q terms of one address can have opposite signs.
//
// Lint: the submodules' assertions use `disable iff (!rst_n)` with the
// asynchronous reset, reported as a sync/async net mix (SYNCASYNCNET); this
// is checking code only and does not change the circuit.
module da_rotator
  import idct_pkg::*;
#(
  parameter angle_e      ANGLE = ANG_PI_4,
  parameter int unsigned ROM_W = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       first_digit,
  input  logic [1:0] xs_p,     // digit of p
  input  logic [1:0] xs_q,     // digit of q
  output r4_t        xc_p,     // digit of p'
  output r4_t        xc_q      // digit of q'
);
  logic [3:0]       addr;
  logic             swap, neg_p, neg_q, aors_p, aors_q;
  logic [ROM_W-1:0] rom_p, rom_q;

  addr_decoder u_adec (
    .dp(xs_p), .dq(xs_q), .first_digit(first_digit),
    .addr(addr), .swap(swap), .neg_p(neg_p), .neg_q(neg_q)
  );

  op_decoder #(.ANGLE(ANGLE), .ROM_W(ROM_W)) u_odec (
    .addr(addr), .swap(swap), .neg_p(neg_p), .neg_q(neg_q),
    .aors_p(aors_p), .aors_q(aors_q)
  );

  da_rom #(.ANGLE(ANGLE), .SEL_Q(1'b0), .ROM_W(ROM_W)) u_rom_p (.addr(addr), .word(rom_p));
  da_rom #(.ANGLE(ANGLE), .SEL_Q(1'b1), .ROM_W(ROM_W)) u_rom_q (.addr(addr), .word(rom_q));

  hsd_accumulator #(.ROM_W(ROM_W)) u_acc_p (
    .clk(clk), .rst_n(rst_n), .en(en), .first(first_digit), .aors(aors_p),
    .o(swap ? rom_q : rom_p), .dout(xc_p)
  );

  hsd_accumulator #(.ROM_W(ROM_W)) u_acc_q (
    .clk(clk), .rst_n(rst_n), .en(en), .first(first_digit), .aors(aors_q),
    .o(swap ? rom_p : rom_q), .dout(xc_q)
  );
endmodule
