// imem: the instruction memory port of IF, DEPTH words of 32 bits.
// The fetch address is the word address held in the PC (the byte address is
// {PC, 2'b00}); only its low log2(DEPTH) bits are used. The read is
// combinational, so the instruction is in the IF/ID latch at the end of the
// fetch cycle. A synchronous write port loads the program. The memory is an
// ideal single-cycle array: the size is this design's choice.
module imem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [29:0]              addr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[addr[$clog2(DEPTH)-1:0]];
endmodule
