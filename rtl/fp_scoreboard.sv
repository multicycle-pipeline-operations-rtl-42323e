// fp_scoreboard: per-register "ready" bits for the FP register file, used by
// ID to interlock RAW and WAW hazards on FP registers.
//
// A register is ready when no issued instruction still has to write it.
// When an FP-writing instruction leaves ID (issue_we) its destination becomes
// not ready; when WF writes a register (wr_we) one pending write completes.
// Ready bits start at 1 after reset.
//
// A plain ready bit cannot follow two pending writes to one register, which
// happens when a second write is issued the cycle before (or the cycle) the
// first one reaches WF, for example a loop-carried mul.s f2,f2,f1 that takes
// its operand from the WF bypass. Each register therefore keeps a 2-bit count
// of pending writes; ready is count == 0 and single is count == 1. ID only
// issues a second write to a register whose one pending write is in WF or
// will be next cycle, so writes to a register always happen in program order
// and the count never exceeds 2. When ID instead cancels an older write that
// would land later (WAW suppression), it does not raise issue_we: the new
// write takes the cancelled one's place in the count.
// Timing: outputs are registered state; an issue and a write in the same
// cycle to the same register leave its count unchanged.
module fp_scoreboard #(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     issue_we,
  input  logic [$clog2(NREGS)-1:0] issue_fd,
  input  logic                     wr_we,
  input  logic [$clog2(NREGS)-1:0] wr_fd,
  output logic [NREGS-1:0]         ready,
  output logic [NREGS-1:0]         single
);
  localparam int unsigned AW = $clog2(NREGS);
  logic [1:0] cnt [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) cnt[r] <= 2'd0;
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        unique case ({issue_we && issue_fd == AW'(r), wr_we && wr_fd == AW'(r)})
          2'b10:   cnt[r] <= cnt[r] + 2'd1;
          2'b01:   cnt[r] <= cnt[r] - 2'd1;
          default: cnt[r] <= cnt[r];
        endcase
      end
    end
  end

  always_comb
    for (int r = 0; r < NREGS; r++) begin
      ready[r]  = (cnt[r] == 2'd0);
      single[r] = (cnt[r] == 2'd1);
    end

  always_ff @(posedge clk)
    if (rst_n)
      for (int r = 0; r < NREGS; r++) begin
        assert (!(wr_we && wr_fd == AW'(r) && cnt[r] == 2'd0 && !(issue_we && issue_fd == AW'(r))))
          else $error("fp_scoreboard: write to register %0d with no pending write", r);
        assert (!(issue_we && issue_fd == AW'(r) && cnt[r] == 2'd3))
          else $error("fp_scoreboard: too many pending writes to register %0d", r);
      end

endmodule
