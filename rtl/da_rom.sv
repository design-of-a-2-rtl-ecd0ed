// da_rom: 16-word ROM of one DA rotator accumulator.
//
// Holds the magnitudes of R_P (SEL_Q = 0) or R_Q (SEL_Q = 1) for rotation
// angle ANGLE, addressed by {q digit, p digit} (two unsigned bits each).
// Word = |round((p*cos - q*sin)/2 * 2^G)| or |round((q*cos + p*sin)/2 * 2^G)|
// with G = ROM_W - 5 (see idct_pkg); the sign of each entry is produced by
// the operation decoder. The design asks for two leading zero bits in every
// word; here three are zero, because the accumulator's GUARD rounding needs
// every word below 1/8 of the window. Contents are a constant computed at
// elaboration. Asynchronous (combinational) read.
module da_rom
  import idct_pkg::*;
#(
  parameter angle_e     ANGLE = ANG_PI_4,
  parameter bit         SEL_Q = 1'b0,
  parameter int unsigned ROM_W = 14
) (
  input  logic [3:0]       addr,
  output logic [ROM_W-1:0] word
);
  typedef logic [ROM_W-1:0] word_t;

  function automatic word_t entry(input int a);
    int v;
    v = rom_value(ANGLE, SEL_Q, a % 4, a / 4, int'(ROM_W));
    if (v < 0) v = -v;
    return word_t'(v);
  endfunction

  function automatic logic [16*ROM_W-1:0] build();
    logic [16*ROM_W-1:0] r;
    r = '0;
    for (int a = 0; a < 16; a++) r[a*ROM_W +: ROM_W] = entry(a);
    return r;
  endfunction

  localparam logic [16*ROM_W-1:0] CONTENTS = build();

  always_comb word = CONTENTS[addr*ROM_W +: ROM_W];
endmodule
