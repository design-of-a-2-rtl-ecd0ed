// idct_pkg: types, constants and constant functions shared by the 2-D IDCT
// processor.
//
// Number formats
//   * A binary signed digit (BSD) is a pair of bits {p, m} with value p - m
//     (digit set {-1, 0, 1}; {1,1} is a second code for 0).
//   * A radix-4 signed digit is two BSD digits {hi, lo} with value 2*hi + lo,
//     so it lies in {-3..3}. The datapath between the rotators and the
//     converters carries one radix-4 digit per cycle, most significant first.
//   * A 1-D core processes one 8-point vector per FRAME = 10 cycles. An input
//     word is serialised as 8 two-bit digits (16 bits, MSB first); each
//     rotator stream frame is one idle cycle followed by 9 digits k0..k8,
//     k0 always zero (k8 is taken from the accumulator remainder). With
//     the three leading zero ROM bits, the leading zero digits are the headroom
//     the two on-line adder stages need (each adder can grow its result by
//     one digit position at the top).
//
// Rotator ROM contents (eq. 3.15, with the IDCT's factor 1/2 folded in):
//   word_P(x, y) = round( (x*cos(phi) - y*sin(phi)) / 2 * 2^G )
//   word_Q(x, y) = round( (y*cos(phi) + x*sin(phi)) / 2 * 2^G )
// for unsigned two-bit digits x (from p) and y (from q), G = ROM_W - 5. The
// cosines and sines below are rounded to 16 fractional bits. With G = ROM_W-5
// every magnitude stays below 2^(ROM_W-3), i.e. below one eighth of the
// accumulator window, which is what the GUARD recoding needs.
//
// Lint: checked on its own, the package reports FRAME and SER_W as unused
// parameters; they are used by idct1d_core through the import.
package idct_pkg;

  // One binary signed digit.
  typedef struct packed {
    logic p;   // positive component
    logic m;   // negative component
  } bsd_t;

  // One radix-4 signed digit: value 2*hi + lo.
  typedef struct packed {
    bsd_t hi;
    bsd_t lo;
  } r4_t;

  localparam int unsigned FRAME      = 10;  // cycles per 8-point vector
  localparam int unsigned NDIG       = 8;   // input digits (2 bits) per word
  localparam int unsigned SER_W      = 2 * NDIG; // serialised word width

  // Rotation angles of the four rotator kinds.
  typedef enum logic [1:0] {
    ANG_PI_4   = 2'd0,
    ANG_PI_8   = 2'd1,
    ANG_PI_16  = 2'd2,
    ANG_3PI_16 = 2'd3
  } angle_e;

  // cos/sin of each angle, scaled by 2^16.
  function automatic int cos16(input angle_e a);
    case (a)
      ANG_PI_4:   return 46341;
      ANG_PI_8:   return 60547;
      ANG_PI_16:  return 64277;
      default:    return 54491;
    endcase
  endfunction

  function automatic int sin16(input angle_e a);
    case (a)
      ANG_PI_4:   return 46341;
      ANG_PI_8:   return 25080;
      ANG_PI_16:  return 12785;
      default:    return 36410;
    endcase
  endfunction

  // Signed ROM value for unsigned digits x (p operand) and y (q operand).
  // sel_q = 0: R_P table, sel_q = 1: R_Q table.
  function automatic int rom_value(input angle_e a, input bit sel_q,
                                   input int x, input int y, input int rom_w);
    int  num;
    int  sh;
    num = sel_q ? (y * cos16(a) + x * sin16(a)) : (x * cos16(a) - y * sin16(a));
    // scale by 2^(G-17): 2^-16 for the constants, 2^-1 for the IDCT factor
    sh  = 17 - (rom_w - 5);
    if (num >= 0) return (num + (1 <<< (sh - 1))) >>> sh;
    else          return -((-num + (1 <<< (sh - 1))) >>> sh);
  endfunction

  // Value of a BSD digit.
  function automatic int bsd_val(input bsd_t d);
    return int'(d.p) - int'(d.m);
  endfunction

  // Value of a radix-4 signed digit.
  function automatic int r4_val(input r4_t d);
    return 2 * bsd_val(d.hi) + bsd_val(d.lo);
  endfunction

  // Negate a BSD digit by exchanging its components.
  function automatic bsd_t bsd_neg(input bsd_t d);
    return '{p: d.m, m: d.p};
  endfunction

  function automatic r4_t r4_neg(input r4_t d);
    return '{hi: bsd_neg(d.hi), lo: bsd_neg(d.lo)};
  endfunction

endpackage
