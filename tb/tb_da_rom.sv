// tb_da_rom: checks every word of two rotator ROMs (pi/8 P table and 3pi/16
// Q table) against the real rotation terms: word = |(x cos - y sin)/2| or
// |(y cos + x sin)/2| scaled by 2^(ROM_W-5), within one unit, and below one
// eighth of the word range.
module tb_da_rom;
  import idct_pkg::*;
  localparam int ROM_W = 14;
  logic [3:0]       addr;
  logic [ROM_W-1:0] wp, wq;
  int checks = 0, failures = 0;

  da_rom #(.ANGLE(ANG_PI_8),   .SEL_Q(1'b0)) dut_p (.addr(addr), .word(wp));
  da_rom #(.ANGLE(ANG_3PI_16), .SEL_Q(1'b1)) dut_q (.addr(addr), .word(wq));

  initial begin
    for (int k = 0; k < 16; k++) begin
      real x, y, ep, eq, sc;
      addr = 4'(k);
      #1;
      x = real'(k % 4); y = real'(k / 4);
      sc = real'(1 << (ROM_W - 5));
      ep = (x * $cos(3.14159265358979 / 8.0) - y * $sin(3.14159265358979 / 8.0)) / 2.0 * sc;
      eq = (y * $cos(3.0 * 3.14159265358979 / 16.0) + x * $sin(3.0 * 3.14159265358979 / 16.0)) / 2.0 * sc;
      if (ep < 0) ep = -ep;
      if (eq < 0) eq = -eq;
      checks += 2;
      if (real'(wp) - ep > 1.0 || ep - real'(wp) > 1.0 || wp >= (1 << (ROM_W - 3))) begin
        failures++; $display("FAIL P[%0d] = %0d expected %f", k, wp, ep);
      end
      if (real'(wq) - eq > 1.0 || eq - real'(wq) > 1.0 || wq >= (1 << (ROM_W - 3))) begin
        failures++; $display("FAIL Q[%0d] = %0d expected %f", k, wq, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("tb_da_rom: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
