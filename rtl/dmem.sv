// dmem: the data memory port of ME, DEPTH words of 32 bits, word aligned.
// The address is the byte address computed by the ALU; bits 1:0 are ignored
// and the next log2(DEPTH) bits select the word. Reads are combinational
// (the loaded word is in the ME/WB latch at the end of ME); writes happen at
// the clock edge. A second, read-only port is for observation. The memory is
// an ideal single-cycle array: the size is this design's choice.
module dmem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  input  logic                     we,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata,
  input  logic [$clog2(DEPTH)-1:0] dbg_addr,
  output logic [31:0]              dbg_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr[AW+1:2]] <= wdata;

  assign rdata     = mem[addr[AW+1:2]];
  assign dbg_rdata = mem[dbg_addr];
endmodule
