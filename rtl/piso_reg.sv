// piso_reg: parallel-in serial-out register of a 1-D IDCT core.
//
// Upper part: an array of eight IN_W-bit registers that words are pipelined
// into one per cycle (`din_we`). Lower part: eight SER_W-bit shift
// registers. A `load` pulse copies the eight words into the shift registers
// (the first word written goes to output 0), left-aligned, with the unused
// low bits zero; the array is then free for the next eight words. In every
// other cycle the shift registers move left by two bits, filling with zeros,
// so xs[i] gives word i two bits at a time, most significant first. The
// structure follows the design; SER_W = 16 for both cores is this
// implementation's choice (the row core's 12-bit words get four zero bits).
//
// Timing: the eighth word may be written in the cycle before `load`; digit k
// of every word is on xs in cycle load+1+k.
module piso_reg #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned SER_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] din,
  input  logic            din_we,
  input  logic            load,
  output logic [1:0]      xs [8]
);
  logic [IN_W-1:0]  arr [8];   // arr[0] holds the most recent word
  logic [SER_W-1:0] sh  [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        arr[i] <= '0;
        sh[i]  <= '0;
      end
    end else begin
      if (din_we) begin
        arr[0] <= din;
        for (int i = 1; i < 8; i++) arr[i] <= arr[i-1];
      end
      for (int i = 0; i < 8; i++) begin
        if (load) sh[i] <= {arr[7-i], {(SER_W-IN_W){1'b0}}};
        else      sh[i] <= sh[i] << 2;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) xs[i] = sh[i][SER_W-1 -: 2];
  end
endmodule
