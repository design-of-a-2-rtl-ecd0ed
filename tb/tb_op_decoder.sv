// tb_op_decoder: exhaustive test of the rotator operation decoder for two
// angles. AorS of each accumulator must be the sign of the real rotation
// term of the table entry it receives (P, or Q when exchanged), flipped by
// the negation flag.
module tb_op_decoder;
  import idct_pkg::*;
  logic [3:0] addr;
  logic       swap, neg_p, neg_q;
  logic       ap0, aq0, ap1, aq1;
  int checks = 0, failures = 0;

  op_decoder #(.ANGLE(ANG_3PI_16)) dut0 (.addr(addr), .swap(swap), .neg_p(neg_p),
    .neg_q(neg_q), .aors_p(ap0), .aors_q(aq0));
  op_decoder #(.ANGLE(ANG_PI_8)) dut1 (.addr(addr), .swap(swap), .neg_p(neg_p),
    .neg_q(neg_q), .aors_p(ap1), .aors_q(aq1));

  function automatic void check(input real ang, input logic gp, input logic gq);
    real x, y, c, s, p, q;
    logic ep, eq;
    x = real'(addr[1:0]); y = real'(addr[3:2]);
    c = $cos(ang); s = $sin(ang);
    p = (x * c - y * s); q = (y * c + x * s);
    ep = ((swap ? q : p) < -1e-9) ^ neg_p;
    eq = ((swap ? p : q) < -1e-9) ^ neg_q;
    checks++;
    if (gp !== ep || gq !== eq) begin
      failures++;
      $display("FAIL angle %f addr=%h swap=%0b neg=%0b%0b: aors=%0b%0b expected %0b%0b",
               ang, addr, swap, neg_p, neg_q, gp, gq, ep, eq);
    end
  endfunction

  initial begin
    for (int k = 0; k < 128; k++) begin
      {neg_q, neg_p, swap, addr} = 7'(k);
      #1;
      check(3.0 * 3.14159265358979 / 16.0, ap0, aq0);
      check(3.14159265358979 / 8.0, ap1, aq1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("tb_op_decoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
