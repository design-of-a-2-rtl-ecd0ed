// addr_decoder: ROM address decoder of a DA rotator.
//
// Each cycle the rotator receives one two-bit digit of each operand, p (x in
// the address table) and q (y). Ordinary digits are unsigned (0..3) and are
// used directly as the address {q, p}. The first digit of a two's complement
// word carries the sign bit and is the signed value -2*b1 + b0 (-2..1). The
// ROMs hold only entries for unsigned digits, so the first digit is mapped
// onto an equivalent address, following the documented address truth table:
//   * both digits >= 0          : same address
//   * both digits <= 0          : address of the magnitudes, both results
//                                  negated
//   * digits of opposite signs  : address {|p|, |q|} with the operands
//                                  exchanged, and the two ROM outputs
//                                  exchanged between the two accumulators
//                                  (R_P(p,q) = -R_Q(|q|,|p|) when p < 0 < q,
//                                  and so on); the operand that is negative
//                                  negates its own result.
// The exchange and negate flags are this implementation's reading of how the
// table's mixed-sign rows can be used; the table does not name them.
// Purely combinational.
module addr_decoder (
  input  logic [1:0] dp,          // digit of p, bits (j, j-1)
  input  logic [1:0] dq,          // digit of q
  input  logic       first_digit, // digit holds the sign bit
  output logic [3:0] addr,        // ROM address {q', p'}
  output logic       swap,        // exchange the two ROM outputs
  output logic       neg_p,       // negate the P accumulator's term
  output logic       neg_q        // negate the Q accumulator's term
);
  int ps, qs;
  logic [1:0] ap, aq;

  always_comb begin
    ps    = first_digit ? (-2 * int'(dp[1]) + int'(dp[0])) : int'(dp);
    qs    = first_digit ? (-2 * int'(dq[1]) + int'(dq[0])) : int'(dq);
    ap    = 2'(ps < 0 ? -ps : ps);
    aq    = 2'(qs < 0 ? -qs : qs);
    swap  = 1'b0;
    neg_p = 1'b0;
    neg_q = 1'b0;
    addr  = {aq, ap};
    if (ps <= 0 && qs <= 0) begin
      neg_p = (ps != 0) || (qs != 0);
      neg_q = neg_p;
    end else if ((ps < 0 && qs > 0) || (ps > 0 && qs < 0)) begin
      swap  = 1'b1;
      addr  = {ap, aq};
      neg_p = (ps < 0);
      neg_q = (qs < 0);
    end
  end
endmodule
