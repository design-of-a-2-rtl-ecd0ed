// butterfly_array: the two-stage butterfly of one 1-D IDCT core, built from
// sixteen radix-4 on-line adders.
//
// Inputs are the twelve rotator outputs, named after the terms of the 8-point
// IDCT decomposition: a_uv are the "q'" outputs and b_uv the "p'" outputs of
// the rotators (pi/4: a00,b00; pi/8: a02,b02; 3pi/16: a03,b03 and a01,b01;
// pi/16: a13,b13 and a11,b11). With the 1/2 of the IDCT already applied in
// the rotators:
//   stage 1:  e0 = a00 + a02   e1 = b00 - b02   e2 = b00 + b02   e3 = a00 - a02
//             o0 = a11 + a03   o1 = b01 - a13   o2 = a01 - b13   o3 = b03 - b11
//   stage 2:  x(i) = e_i + o_i,  x(7-i) = e_i - o_i   (i = 0..3)
// These pairings were derived here from the rotations the design specifies;
// the stage-1 pairings of the odd half differ from the printed butterfly
// diagram, which does not reproduce the IDCT with those rotation
// definitions. Timing: two cycles per stage, four in all.
module butterfly_array
  import idct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  r4_t  a00, b00, a02, b02, a03, b03, a13, b13, a01, b01, a11, b11,
  output r4_t  xr [8]      // xr[i] = digit of x(i)
);
  r4_t e0, e1, e2, e3, o0, o1, o2, o3;

  ol_adder_r4 #(.SUB(1'b0)) u_e0 (.clk(clk), .rst_n(rst_n), .x(a00), .y(a02), .s(e0));
  ol_adder_r4 #(.SUB(1'b1)) u_e1 (.clk(clk), .rst_n(rst_n), .x(b00), .y(b02), .s(e1));
  ol_adder_r4 #(.SUB(1'b0)) u_e2 (.clk(clk), .rst_n(rst_n), .x(b00), .y(b02), .s(e2));
  ol_adder_r4 #(.SUB(1'b1)) u_e3 (.clk(clk), .rst_n(rst_n), .x(a00), .y(a02), .s(e3));
  ol_adder_r4 #(.SUB(1'b0)) u_o0 (.clk(clk), .rst_n(rst_n), .x(a11), .y(a03), .s(o0));
  ol_adder_r4 #(.SUB(1'b1)) u_o1 (.clk(clk), .rst_n(rst_n), .x(b01), .y(a13), .s(o1));
  ol_adder_r4 #(.SUB(1'b1)) u_o2 (.clk(clk), .rst_n(rst_n), .x(a01), .y(b13), .s(o2));
  ol_adder_r4 #(.SUB(1'b1)) u_o3 (.clk(clk), .rst_n(rst_n), .x(b03), .y(b11), .s(o3));

  ol_adder_r4 #(.SUB(1'b0)) u_x0 (.clk(clk), .rst_n(rst_n), .x(e0), .y(o0), .s(xr[0]));
  ol_adder_r4 #(.SUB(1'b1)) u_x7 (.clk(clk), .rst_n(rst_n), .x(e0), .y(o0), .s(xr[7]));
  ol_adder_r4 #(.SUB(1'b0)) u_x1 (.clk(clk), .rst_n(rst_n), .x(e1), .y(o1), .s(xr[1]));
  ol_adder_r4 #(.SUB(1'b1)) u_x6 (.clk(clk), .rst_n(rst_n), .x(e1), .y(o1), .s(xr[6]));
  ol_adder_r4 #(.SUB(1'b0)) u_x2 (.clk(clk), .rst_n(rst_n), .x(e2), .y(o2), .s(xr[2]));
  ol_adder_r4 #(.SUB(1'b1)) u_x5 (.clk(clk), .rst_n(rst_n), .x(e2), .y(o2), .s(xr[5]));
  ol_adder_r4 #(.SUB(1'b0)) u_x3 (.clk(clk), .rst_n(rst_n), .x(e3), .y(o3), .s(xr[3]));
  ol_adder_r4 #(.SUB(1'b1)) u_x4 (.clk(clk), .rst_n(rst_n), .x(e3), .y(o3), .s(xr[4]));
endmodule
