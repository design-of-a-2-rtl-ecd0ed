// idct2d_top: 8x8 2-D inverse DCT processor.
//
// The 2-D IDCT is computed by row-column decomposition: a row core applies
// the 8-point 1-D IDCT to each row of the coefficient block, a transpose
// memory reorders the 64 intermediate results, and a column core applies
// the 1-D IDCT to each column. Both cores are the same distributed-arithmetic
// CORDIC datapath (idct1d_core) working on radix-4 signed digits, most
// significant first; the control block sequences the memory and the cores.
//
// Interface: assert `start` with the first coefficient of a block on `din`
// (12-bit two's complement); the 64 coefficients follow row by row, X(0,0)
// first, eight per row in consecutive cycles with two idle cycles after each
// row (80 cycles per block, so 64 results per 80 cycles: 80 Mpixel/s at
// 100 MHz). Blocks may follow back to back (START every 80 cycles). The
// results leave on `dout` (9-bit two's complement, saturated to
// -256..255), one per cycle with `ready` high for each valid word, eight per
// column with two idle cycles between columns. They leave column by column
// (x(0,c), x(1,c), ..., x(7,c) for c = 0..7), i.e. transposed with respect to
// the input order. The first result of a block appears 115 cycles after its
// START.
//
// Scaling: the row core reads a coefficient X as X/2048 and returns each
// row result r in units of 1/8 (r = 8 * 1-D IDCT value). The column core
// gets 2*r, saturated to 16 bits, reads it as a fraction of 2^15 and returns
// c in units of 1/8 again; the output pixel is c/8 rounded to nearest with
// ties to even (ties are frequent at 1/8 resolution, and rounding them
// upward would bias every pixel by +1/16), saturated to 9 bits.
// The word widths (12-bit in, 16-bit internal, 9-bit out) follow the design;
// the scaling between the cores, the rounding and saturation, the input
// gaps and the output order are this implementation's choices. The design
// clocks the transpose memory's ports with complementary clocks; here one
// clock drives everything.
//
// Lint: the column core's dout_idx output is left unconnected (the control
// block already knows the order), which verilator reports as an empty pin (PINCONNECTEMPTY).
// The assertions inside the submodules use `disable iff (!rst_n)` on the
// asynchronous reset, reported as a sync/async net mix (SYNCASYNCNET); that is only in
// checking code, not in the circuit.
module idct2d_top
  import idct_pkg::*;
#(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 9,
  parameter int unsigned INT_W = 16,
  parameter int unsigned ROM_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IN_W-1:0]  din,
  output logic             ready,
  output logic [OUT_W-1:0] dout
);
  logic             row_we, row_load, row_valid;
  logic [2:0]       row_idx;
  logic [INT_W-1:0] row_dout, col_dout, ram_rdata, col_din;
  logic             ram_we, ram_re, col_we, col_load, col_valid;
  logic [5:0]       ram_waddr, ram_raddr;

  idct_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .row_we(row_we), .row_load(row_load), .row_valid(row_valid), .row_idx(row_idx),
    .ram_we(ram_we), .ram_waddr(ram_waddr), .ram_re(ram_re), .ram_raddr(ram_raddr),
    .col_we(col_we), .col_load(col_load)
  );

  idct1d_core #(.IN_W(IN_W), .ROM_W(ROM_W), .OUT_W(INT_W)) u_row (
    .clk(clk), .rst_n(rst_n), .din(din), .din_we(row_we), .load(row_load),
    .dout(row_dout), .dout_valid(row_valid), .dout_idx(row_idx)
  );

  transpose_ram #(.DEPTH(64), .WIDTH(INT_W)) u_tram (
    .clk(clk), .we(ram_we), .waddr(ram_waddr), .wdata(row_dout),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  // column input: 2 * row result, saturated to INT_W bits
  always_comb begin
    if (ram_rdata[INT_W-1] == ram_rdata[INT_W-2])
      col_din = ram_rdata << 1;
    else
      col_din = {ram_rdata[INT_W-1], {(INT_W-1){~ram_rdata[INT_W-1]}}};
  end

  idct1d_core #(.IN_W(INT_W), .ROM_W(ROM_W), .OUT_W(INT_W)) u_col (
    .clk(clk), .rst_n(rst_n), .din(col_din), .din_we(col_we), .load(col_load),
    .dout(col_dout), .dout_valid(col_valid), .dout_idx()
  );

  // output: round half up to an integer, saturate to OUT_W bits
  logic signed [INT_W:0] pix;
  // round to nearest, ties to even: +3, plus 1 more when the kept LSB is 1
  always_comb pix = ($signed({col_dout[INT_W-1], col_dout}) + 3
                     + $signed((INT_W+1)'(col_dout[3]))) >>> 3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0;
      dout  <= '0;
    end else begin
      ready <= col_valid;
      if (pix > $signed((INT_W+1)'((1 << (OUT_W - 1)) - 1)))
        dout <= {1'b0, {(OUT_W-1){1'b1}}};
      else if (pix < -$signed((INT_W+1)'(1 << (OUT_W - 1))))
        dout <= {1'b1, {(OUT_W-1){1'b0}}};
      else
        dout <= OUT_W'(pix);
    end
  end
endmodule
