// rnnc_bank: the eight redundant-to-nonredundant converters of a 1-D core
// and the 8:1 bus multiplexer that sends their results out one per cycle.
//
// Each converter receives one butterfly output stream (x(0)..x(7)). When a
// word is complete (`capture`), the eight results are copied into holding
// registers and then presented on `dout` one per cycle in order x(0)..x(7),
// with `dout_valid` high and `dout_idx` naming the element. The design
// staggers the converters by adding one more buffer stage per converter so
// that the results are ready one cycle apart; copying all eight into holding
// registers and stepping the multiplexer select has the same effect and is
// this implementation's choice. The select counter lives here rather than in
// the processor's control block.
//
// Timing: `first` marks the first digit of a word at the converters' input;
// `capture` must be high in the cycle after the last digit, when the
// converters hold the results. dout then shows x(i) in cycle capture+1+i.
module rnnc_bank
  import idct_pkg::*;
#(
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,
  input  logic             capture,
  input  r4_t              xr [8],
  output logic [OUT_W-1:0] dout,
  output logic             dout_valid,
  output logic [2:0]       dout_idx
);
  localparam int unsigned CONV_W = OUT_W + 2;

  logic [CONV_W-1:0] xt  [8];   // converter outputs
  logic [OUT_W-1:0] xsat [8];   // saturated to OUT_W bits
  logic [OUT_W-1:0] hold [8];
  logic [2:0]       sel;
  logic             busy;

  for (genvar i = 0; i < 8; i++) begin : g_rnnc
    rnnc #(.OUT_W(CONV_W)) u_rnnc (
      .clk(clk), .rst_n(rst_n), .first(first), .din(xr[i]), .x0(xt[i])
    );
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      if (xt[i][CONV_W-1 -: 3] == 3'b000 || xt[i][CONV_W-1 -: 3] == 3'b111)
        xsat[i] = xt[i][OUT_W-1:0];
      else
        xsat[i] = {xt[i][CONV_W-1], {(OUT_W-1){~xt[i][CONV_W-1]}}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) hold[i] <= '0;
      sel  <= '0;
      busy <= 1'b0;
    end else begin
      if (capture) begin
        for (int i = 0; i < 8; i++) hold[i] <= xsat[i];
        sel  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        sel  <= sel + 3'd1;
        busy <= (sel != 3'd7);
      end
    end
  end

  always_comb begin
    dout       = hold[sel];
    dout_valid = busy;
    dout_idx   = sel;
  end
endmodule
