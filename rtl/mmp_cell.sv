// mmp_cell: minus-minus-plus cell, the one-digit hybrid subtractor of the
// signed-digit datapath.
//
// It subtracts an unsigned bit y from a binary signed digit x = xp - xm:
// xp - xm - y = -2*t + u, with t a negative transfer (weight -2) and u an
// interim digit (weight +1). Truth table as documented for the cell;
// the logic equations are this implementation's. Purely combinational.
module mmp_cell (
  input  logic xp,   // positive component of x
  input  logic xm,   // negative component of x
  input  logic y,    // unsigned bit subtracted
  output logic t,    // transfer, weight -2
  output logic u     // interim digit, weight +1
);
  always_comb begin
    // t is set when xp - xm - y is -1 or -2
    t = (xm & ~xp) | (y & ~xp) | (xm & y);
    u = xp ^ xm ^ y;
  end
endmodule
