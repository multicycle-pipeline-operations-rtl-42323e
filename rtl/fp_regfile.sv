// fp_regfile: the separate floating-point register file, 32 registers of 32
// bits, with the two read ports of ID (addressed by instruction bits 15:11
// and 20:16, fs and ft) and the single write port driven by WF. A third read
// port is for observation only.
//
// Reads are combinational. The write happens at the clock edge; a read of the
// register being written in the same cycle returns the new value (write
// before read), so an instruction in ID sees a result that is in WF in that
// cycle. All registers are cleared by reset (a choice of this design).
module fp_regfile #(
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
    else if (we) regs[wa] <= wd;
  end

  assign rd1 = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2) ? wd : regs[ra2];
  assign rd3 = regs[ra3];

endmodule
