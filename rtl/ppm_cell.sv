// ppm_cell: plus-plus-minus cell, the one-digit hybrid adder of the
// signed-digit datapath.
//
// It adds a binary signed digit x = xp - xm and an unsigned bit y and
// splits the result into a transfer t (weight 2) and an interim digit u
// (weight -1):  xp - xm + y = 2*t - u.  The truth table is the one the
// design documents for this cell; the sum-of-products form below is this
// implementation's. Purely combinational.
module ppm_cell (
  input  logic xp,   // positive component of x
  input  logic xm,   // negative component of x
  input  logic y,    // unsigned bit
  output logic t,    // transfer, weight +2
  output logic u     // interim digit, weight -1
);
  always_comb begin
    // t is set when xp - xm + y is 1 or 2
    t = (xp & ~xm) | (y & ~xm) | (xp & y);
    // u is set when the sum is odd
    u = xp ^ xm ^ y;
  end
endmodule
