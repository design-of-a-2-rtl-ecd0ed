// rnnc: redundant-to-nonredundant converter (on-the-fly conversion), most
// significant digit first.
//
// Converts a stream of radix-4 signed digits (-3..3) into a two's complement
// number while the digits arrive, without a carry-propagate subtraction.
// Two candidates are kept: X0, the value of the digits so far, and X1 = X0 - 1
// (the value if a borrow comes from the digits still to come). For each digit
// the APPEND logic decodes its value and produces the select signals
//   plus  (digit > 0): both new candidates are built from X0
//   minus (digit < 0): both new candidates are built from X1
//   neither (digit = 0): X0 from X0 and X1 from X1
// and the two bits appended to each: (digit mod 4) to X0, (digit-1 mod 4) to
// X1. The COPY logic shifts the selected candidates left by two bits and
// appends them. Start values are X0 = 0 and X1 = -1. This follows the
// conversion tables of the design; only the OUT_W least significant bits are
// kept, which is exact whenever the final value fits in OUT_W bits.
//
// Timing: assert `first` with the first digit of a word; after the last
// digit the result is in `x0` one cycle later.
module rnnc
  import idct_pkg::*;
#(
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,   // first (most significant) digit of a word
  input  r4_t              din,     // radix-4 signed digit
  output logic [OUT_W-1:0] x0       // converted value
);
  logic [OUT_W-1:0] q0, q1;        // candidates X0 and X1
  logic [OUT_W-1:0] c0, c1;        // previous candidates as seen by COPY
  logic             plus, minus;
  logic [1:0]       app0, app1;    // bits appended to X0 and X1
  logic signed [3:0] v;

  // APPEND: decode the digit
  always_comb begin
    v     = 4'(2 * bsd_val(din.hi) + bsd_val(din.lo));
    plus  = (v > 0);
    minus = (v < 0);
    app0  = v[1:0];                // v mod 4
    app1  = 2'(v - 4'sd1);         // (v - 1) mod 4
  end

  // COPY: select and append
  always_comb begin
    c0 = first ? '0 : q0;
    c1 = first ? '1 : q1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= '0;
      q1 <= '1;
    end else begin
      q0 <= ((minus ? c1 : c0) << 2) | OUT_W'(app0);
      q1 <= ((plus ? c0 : c1) << 2) | OUT_W'(app1);
    end
  end

  assign x0 = q0;
endmodule
