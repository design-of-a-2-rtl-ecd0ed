// idct_ctrl: control block of the 2-D IDCT processor.
//
// Generates every timing signal of the two 1-D cores and the transpose
// memory from the START pulse and the row core's output strobe:
//   * input sequencer: from START, the 64 coefficients of a block arrive row
//     by row, eight consecutive cycles per row followed by two idle cycles
//     (80 cycles per block); it writes them into the row core's serialiser
//     (`row_we`) and loads the serialiser two cycles before the next row
//     (`row_load`);
//   * write address: each row result (row core strobe, index i = column)
//     goes to the transpose memory at 8r+i for even blocks and at 8i+r for
//     odd blocks, so one 64-word memory suffices: a block's reads free each
//     word before the next block writes it;
//   * read sequencer: once element 52 of a block (row 6, column 4) has been
//     written, it reads the block column by column, eight words in eight
//     cycles then two idle cycles, with the address pattern of that block's
//     parity, writes each word into the column core's serialiser one cycle
//     later (`col_we`, matching the memory's read latency) and loads it
//     (`col_load`) in the tenth cycle of each column.
// The document gives the function of this block (address and enable
// generation for the memory, START and READY handling); the schedule above
// is this implementation's. STARTs must be at least 80 cycles apart; a
// START while a block is still being read in restarts the input sequencer
// (checked by an assertion).
//
// Lint: the assertions use `disable iff (!rst_n)` with the asynchronous
// reset, which verilator reports as a sync/async net mix (SYNCASYNCNET);
// this is checking code only and does not change the circuit.
module idct_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  // row core
  output logic       row_we,
  output logic       row_load,
  input  logic       row_valid,
  input  logic [2:0] row_idx,
  // transpose memory
  output logic       ram_we,
  output logic [5:0] ram_waddr,
  output logic       ram_re,
  output logic [5:0] ram_raddr,
  // column core
  output logic       col_we,
  output logic       col_load
);
  // input sequencer
  logic       in_act;
  logic [3:0] in_ph;      // 0..9 within a row
  logic [2:0] in_row;
  // write side
  logic [2:0] w_row;
  logic       w_par;      // parity of the block being written
  // read side
  logic       rd_act;
  logic [3:0] rd_ph;      // 0..9 within a column
  logic [2:0] rd_col;
  logic       rd_par;
  logic       rd_trig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_act <= 1'b0;
      in_ph  <= '0;
      in_row <= '0;
    end else if (start) begin
      in_act <= 1'b1;
      in_ph  <= 4'd1;
      in_row <= '0;
    end else if (in_act) begin
      if (in_ph == 4'd9) begin
        in_ph  <= '0;
        in_row <= in_row + 3'd1;
        if (in_row == 3'd7) in_act <= 1'b0;
      end else begin
        in_ph <= in_ph + 4'd1;
      end
    end
  end

  always_comb begin
    row_we   = start || (in_act && in_ph < 4'd8);
    row_load = in_act && in_ph == 4'd8;
  end

  // write address generation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_row <= '0;
      w_par <= 1'b0;
    end else if (row_valid && row_idx == 3'd7) begin
      w_row <= w_row + 3'd1;
      if (w_row == 3'd7) w_par <= ~w_par;
    end
  end

  always_comb begin
    ram_we    = row_valid;
    ram_waddr = w_par ? {row_idx, w_row} : {w_row, row_idx};
    rd_trig   = row_valid && w_row == 3'd6 && row_idx == 3'd4;
  end

  // read sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= 1'b0;
      rd_ph  <= '0;
      rd_col <= '0;
      rd_par <= 1'b0;
    end else if (rd_trig) begin
      rd_act <= 1'b1;
      rd_ph  <= '0;
      rd_col <= '0;
      rd_par <= w_par;
    end else if (rd_act) begin
      if (rd_ph == 4'd9) begin
        rd_ph  <= '0;
        rd_col <= rd_col + 3'd1;
        if (rd_col == 3'd7) rd_act <= 1'b0;
      end else begin
        rd_ph <= rd_ph + 4'd1;
      end
    end
  end

  always_comb begin
    ram_re    = rd_act && rd_ph < 4'd8;
    ram_raddr = rd_par ? {rd_col, rd_ph[2:0]} : {rd_ph[2:0], rd_col};
    col_load  = rd_act && rd_ph == 4'd9;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) col_we <= 1'b0;
    else        col_we <= ram_re;
  end

  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !in_act)
    else $error("idct_ctrl: START less than 80 cycles after the previous one");
endmodule
