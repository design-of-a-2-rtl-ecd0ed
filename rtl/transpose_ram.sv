// transpose_ram: the transpose memory between the row and the column core.
//
// A 64-word simple dual-port RAM (one write port, one read port), DEPTH x
// WIDTH bits, written as an array so that synthesis maps it to an embedded
// block RAM. The write is synchronous; the read is synchronous too (address
// registered in one cycle, data valid in the next), as in an FPGA block RAM.
// The design uses one 64-word block RAM; it clocks the two ports on
// opposite clock edges, while here both ports use the rising edge of one
// clock, which is this implementation's choice. The transposition itself is
// done by the address sequence of the control block.
//
// Timing: a write in cycle t is visible to a read issued in cycle t+1 or
// later; rdata shows the word addressed in cycle t in cycle t+1.
module transpose_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
