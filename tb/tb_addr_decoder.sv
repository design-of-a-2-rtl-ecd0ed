// tb_addr_decoder: exhaustive test of the rotator address decoder.
//
// For every digit pair, with and without the first-digit (sign) treatment,
// the table entry that the decoder selects (address, exchange of the P and
// Q tables, negation) must reproduce the exact rotation terms of the signed
// digits: P(x, y) = (x cos - y sin)/2 and Q(x, y) = (y cos + x sin)/2, in
// real arithmetic, for all four rotation angles. The address must hold
// only unsigned digits.
module tb_addr_decoder;
  logic [1:0] dp, dq;
  logic       first_digit;
  logic [3:0] addr;
  logic       swap, neg_p, neg_q;
  int checks = 0, failures = 0;
  int n_swap = 0;

  addr_decoder dut (.dp(dp), .dq(dq), .first_digit(first_digit),
                    .addr(addr), .swap(swap), .neg_p(neg_p), .neg_q(neg_q));

  function automatic real tp(input real c, input real s, input real x, input real y);
    return (x * c - y * s) / 2.0;
  endfunction
  function automatic real tq(input real c, input real s, input real x, input real y);
    return (y * c + x * s) / 2.0;
  endfunction

  initial begin
    real ang [4];
    ang[0] = 3.14159265358979 / 4.0;  ang[1] = 3.14159265358979 / 8.0;
    ang[2] = 3.14159265358979 / 16.0; ang[3] = 3.0 * 3.14159265358979 / 16.0;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < 16; k++) begin
        int  xs, ys, ax, ay;
        first_digit = f[0];
        {dq, dp} = 4'(k);
        #1;
        xs = f ? (-2 * int'(dp[1]) + int'(dp[0])) : int'(dp);
        ys = f ? (-2 * int'(dq[1]) + int'(dq[0])) : int'(dq);
        ax = int'(addr[1:0]); ay = int'(addr[3:2]);
        if (swap) n_swap++;
        for (int a = 0; a < 4; a++) begin
          real c, s, wp, wq, gp, gq;
          c = $cos(ang[a]); s = $sin(ang[a]);
          wp = tp(c, s, xs, ys);  wq = tq(c, s, xs, ys);
          gp = swap ? tq(c, s, ax, ay) : tp(c, s, ax, ay);
          gq = swap ? tp(c, s, ax, ay) : tq(c, s, ax, ay);
          if (neg_p) gp = -gp;
          if (neg_q) gq = -gq;
          checks++;
          if ((gp - wp) > 1e-9 || (wp - gp) > 1e-9 || (gq - wq) > 1e-9 || (wq - gq) > 1e-9) begin
            failures++;
            $display("FAIL first=%0d p=%0d q=%0d angle %0d: addr=%h swap=%0b neg=%0b%0b", f, xs, ys, a, addr, swap, neg_p, neg_q);
          end
        end
        checks++;
        if (!f && (addr != {dq, dp} || swap || neg_p || neg_q)) begin
          failures++;
          $display("FAIL ordinary digit %h changed: addr=%h", k, addr);
        end
      end
    checks++;
    if (n_swap == 0) begin failures++; $display("FAIL: exchange never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("tb_addr_decoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
