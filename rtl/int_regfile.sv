// int_regfile: the integer register file, 32 registers of 32 bits with
// register 0 hard-wired to zero, two read ports for ID (rs at 25:21, rt at
// 20:16) and one write port driven by WB. A third read port is for
// observation only.
//
// Reads are combinational; the write happens at the clock edge and a read of
// the register being written in the same cycle returns the new value (write
// before read), so WB needs no bypass to ID. Registers are cleared by reset
// (a choice of this design).
module int_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  output logic [W-1:0]             rd1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [W-1:0]             rd2,
  input  logic [$clog2(NREGS)-1:0] ra3,
  output logic [W-1:0]             rd3,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [W-1:0]             wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    else if (we && wa != '0) regs[wa] <= wd;
  end

  function automatic logic [W-1:0] rd(input logic [$clog2(NREGS)-1:0] ra);
    if (ra == '0)           return '0;
    else if (we && wa == ra) return wd;
    else                    return regs[ra];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
