// op_decoder: operation decoder of a DA rotator.
//
// The ROMs store magnitudes only, so each accumulator is told per cycle
// whether to add (AorS = 0) or subtract (AorS = 1) the ROM word. The sign is
// that of the signed table entry that reaches the accumulator (the P entry,
// or the Q entry when the address decoder exchanges the ROM outputs), flipped
// when the address decoder asks for negation of the first, signed digit.
// Because R_P and R_Q can have different signs for the same address, there
// is one AorS per accumulator. Purely combinational; the sign table is
// computed from the same constants as the ROM contents.
module op_decoder
  import idct_pkg::*;
#(
  parameter angle_e      ANGLE = ANG_PI_4,
  parameter int unsigned ROM_W = 14
) (
  input  logic [3:0] addr,
  input  logic       swap,
  input  logic       neg_p,
  input  logic       neg_q,
  output logic       aors_p,   // 1: P accumulator subtracts
  output logic       aors_q    // 1: Q accumulator subtracts
);
  function automatic logic [15:0] signs(input bit sel_q);
    logic [15:0] r;
    for (int a = 0; a < 16; a++)
      r[a] = rom_value(ANGLE, sel_q, a % 4, a / 4, int'(ROM_W)) < 0;
    return r;
  endfunction

  // sign of R_P / R_Q per address
  localparam logic [15:0] SGN_P = signs(1'b0);
  localparam logic [15:0] SGN_Q = signs(1'b1);

  always_comb begin
    aors_p = (swap ? SGN_Q[addr] : SGN_P[addr]) ^ neg_p;
    aors_q = (swap ? SGN_P[addr] : SGN_Q[addr]) ^ neg_q;
  end
endmodule
