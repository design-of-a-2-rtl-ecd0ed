// ol_adder_r4: radix-4 on-line (most significant digit first) signed-digit
// adder/subtractor.
//
// Each cycle it takes one radix-4 digit of x and of y, each as two binary
// signed digits {hi, lo}, and after two cycles emits the corresponding
// radix-4 digit of x + y (SUB = 0) or x - y (SUB = 1). Subtraction exchanges
// the components of y. The addition is done in two carry-free steps, as for
// parallel signed-digit addition: PPM cells add x and the positive part of
// y (z = x + y+), then MMP cells subtract the negative part (s = z - y-).
// A transfer moves one digit position up at each step, so a result digit
// depends on the next two input positions. Those arrive in the next cycle,
// so the low-position interim digit u, the low-position y- and the
// low-position MMP interim digit w are kept for one cycle, and the result
// pair for positions (2m-1, 2m) is formed in cycle m+1 and registered.
//
// Timing: input digit at cycle c, result digit of the same weight at
// cycle c+2. The result is exact provided the two operands' digit positions
// above the stream (the transfer into the top) are zero, i.e. the stream
// starts with a zero digit; the rotators emit two leading zero digits per
// word for the two adder stages.
module ol_adder_r4
  import idct_pkg::*;
#(
  parameter bit SUB = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  r4_t  x,
  input  r4_t  y,
  output r4_t  s
);
  r4_t  yy;
  logic t_h, u_h, t_l, u_l;     // PPM outputs, high / low position
  logic v_a, w_a, v_b, w_b;     // MMP outputs, positions 2m and 2m+1
  logic u_lr, ym_lr, w_r;       // kept from the previous cycle
  bsd_t z_a, z_b;               // interim digits, positions 2m and 2m+1
  r4_t  s_next;

  always_comb yy = SUB ? r4_neg(y) : y;

  // step 1: z = x + y+
  ppm_cell u_ppm_h (.xp(x.hi.p), .xm(x.hi.m), .y(yy.hi.p), .t(t_h), .u(u_h));
  ppm_cell u_ppm_l (.xp(x.lo.p), .xm(x.lo.m), .y(yy.lo.p), .t(t_l), .u(u_l));

  always_comb begin
    z_a = '{p: t_h, m: u_lr};   // previous low position + transfer from high
    z_b = '{p: t_l, m: u_h};    // current high position + transfer from low
  end

  // step 2: s = z - y-
  mmp_cell u_mmp_a (.xp(z_a.p), .xm(z_a.m), .y(ym_lr),    .t(v_a), .u(w_a));
  mmp_cell u_mmp_b (.xp(z_b.p), .xm(z_b.m), .y(yy.hi.m),  .t(v_b), .u(w_b));

  always_comb begin
    // s_{2m-1} = w_{2m-1} - v_{2m},  s_{2m} = w_{2m} - v_{2m+1}
    s_next.hi = '{p: w_r, m: v_a};
    s_next.lo = '{p: w_a, m: v_b};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_lr  <= 1'b0;
      ym_lr <= 1'b0;
      w_r   <= 1'b0;
      s     <= '0;
    end else begin
      u_lr  <= u_l;
      ym_lr <= yy.lo.m;
      w_r   <= w_b;
      s     <= s_next;
    end
  end
endmodule
