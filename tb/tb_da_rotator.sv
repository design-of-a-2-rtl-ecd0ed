// tb_da_rotator: self-checking test of one DA rotator (angle pi/16).
//
// Random 16-bit fractions p and q (plus the extreme values) are serialised
// two bits per cycle, MSB first. The eight output digits of each result are
// weighed (4, 1, 1/4, ...) and compared with (p*cos - q*sin)/2 and
// (q*cos + p*sin)/2 computed in real arithmetic. The bound 2^-10 covers the
// ROM rounding (half an LSB of 2^-9 per term, weights 1/2, 1/8, ...) and the
// dropped accumulator remainder. Also checks the one-cycle digit latency.
module tb_da_rotator;
  import idct_pkg::*;

  localparam angle_e ANG = ANG_PI_16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0, first_digit = 1'b0;
  logic [1:0] xs_p = '0, xs_q = '0;
  r4_t xc_p, xc_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  da_rotator #(.ANGLE(ANG)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .first_digit(first_digit),
    .xs_p(xs_p), .xs_q(xs_q), .xc_p(xc_p), .xc_q(xc_q)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rotate(input logic signed [15:0] p, input logic signed [15:0] q);
    real rp, rq, vp, vq, ep, eq, ang;
    ang = PI / 16.0;
    rp = real'(p) / 32768.0;
    rq = real'(q) / 32768.0;
    ep = (rp * $cos(ang) - rq * $sin(ang)) / 2.0;
    eq = (rq * $cos(ang) + rp * $sin(ang)) / 2.0;
    vp = 0.0; vq = 0.0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      en = 1'b1; first_digit = (k == 0);
      xs_p = p[15-2*k -: 2]; xs_q = q[15-2*k -: 2];
      @(posedge clk); #1;
      // digit k is registered at this edge
      vp += real'(r4_val(xc_p)) * (4.0 ** (1 - k));
      vq += real'(r4_val(xc_q)) * (4.0 ** (1 - k));
    end
    @(negedge clk); en = 1'b0; first_digit = 1'b0;
    checks += 2;
    if ((vp - ep) > 0.001 || (ep - vp) > 0.001) begin
      failures++; $display("FAIL p' p=%0d q=%0d got %f exp %f", p, q, vp, ep);
    end
    if ((vq - eq) > 0.001 || (eq - vq) > 0.001) begin
      failures++; $display("FAIL q' p=%0d q=%0d got %f exp %f", p, q, vq, eq);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rotate(16'sh7fff, 16'sh7fff);
    rotate(-16'sh8000, -16'sh8000);
    rotate(-16'sh8000, 16'sh7fff);
    rotate(16'sh7fff, -16'sh8000);
    rotate(16'sd0, 16'sd0);
    rotate(16'sd1, -16'sd1);
    for (int n = 0; n < 2000; n++) rotate(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
