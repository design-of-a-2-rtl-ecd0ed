// tb_mmp_cell: exhaustive test of the MMP cell. For every input the outputs
// must satisfy the cell's arithmetic identity xp - xm - y = -2t + u.
module tb_mmp_cell;
  logic xp, xm, y, t, u;
  int checks = 0, failures = 0;

  mmp_cell dut (.xp(xp), .xm(xm), .y(y), .t(t), .u(u));

  initial begin
    for (int k = 0; k < 8; k++) begin
      {xp, xm, y} = 3'(k);
      #1;
      checks++;
      if (int'(xp) - int'(xm) - int'(y) != -2 * int'(t) + int'(u)) begin
        failures++;
        $display("FAIL xp=%0b xm=%0b y=%0b: t=%0b u=%0b", xp, xm, y, t, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("tb_mmp_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
