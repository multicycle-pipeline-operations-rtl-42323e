// fp_wf_ctrl: the control side of the floating-point pipeline. It carries,
// for every FP result in flight, a write enable (we), the destination
// register (fd) and the WF multiplexer select (xw) down a chain of latches
// that runs beside M1..M6, and it stalls ID when two results would need the
// single FP register write port (stage WF) in the same cycle.
//
// Entry k of the chain holds the instruction that reaches WF in k cycles;
// entry 0 is the WF stage itself. The latches are, in pipeline terms:
//   k=6 ID/M1   k=5 M1/M2   k=4 M2/M3   k=3 M3/M4   k=2 M4/M5
//   k=1 M5/M6   k=0 M6/WF
// An instruction leaving ID (id_go) enters the chain at its distance from WF:
//   mul.s  (6 cycles after ID) at k=6 with xw = 2
//   add.s/sub.s (4 cycles)    at k=4 with xw = 1, merged with entry 5
//   lwc1   (ME then WF)       at k=2 with xw = 0, merged with entry 3
// so the chain is also the reservation register for the WF port. An add in
// ID collides when entry 5 is occupied, a load when entry 3 is; stall_wf is
// the OR of the two checks. Finished divides wait in the divider (they never
// stall ID here): div_req is granted into WF (k=0) in a cycle in which entry
// 1 is empty, so instructions already in the chain always keep priority.
//
// Outputs wf_* are the WF stage (FP register write port and WF multiplexer
// select); nx_* is the instruction that writes in the next cycle, which ID
// uses to decide that an operand can be taken from the WF bypass.
// With IN_ORDER_WF = 1 the unit also enforces in-order completion, the
// simplest way to precise floating-point exceptions: an FP instruction is
// held in ID (stall_order) while an older one would reach WF after it, that
// is while any chain entry above its insertion point is occupied or a
// divide is in flight (div_inflight) and not being granted WF this cycle.
// The default, 0, lets results complete out of order.
//
// With WAW_SUPPRESS = 1 (the default) a WAW hazard with no read in between
// is removed by cancelling the older write: when an add or load leaving ID
// writes the same register as an entry above its insertion point (a result
// that would land after it), that entry's we is cleared, so its WF cycle
// passes without a write. waw_above tells ID that this case applies
// (waw_cancel: it happens this cycle). Reads in between cannot exist: the
// RAW interlock holds any reader of the register until the older write
// completes, so the second writer reaches ID only after it.
// Insertion points, the constants 2'd0/2'd1/2'd2 and the stall terms follow
// the pipeline drawing; the divider path (xw = 3) is this design's own.
module fp_wf_ctrl
  import mips_fp_pkg::*;
#(
  parameter bit IN_ORDER_WF  = 1'b0,
  parameter bit WAW_SUPPRESS = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  // ID stage
  input  logic       id_uses_mul,
  input  logic       id_uses_add,
  input  logic       id_fp_load,
  input  logic [4:0] id_fd,
  input  logic       id_go,         // the instruction in ID advances this cycle
  output logic       stall_wf,      // WF structural hazard: stall IF and ID
  output logic       stall_order,   // IN_ORDER_WF: an older result is still due
  output logic       waw_above,     // an older write of id_fd would land later
  output logic       waw_cancel,    // WAW_SUPPRESS: that write is cancelled now
  // divider waiting for WF
  input  logic       div_inflight,  // a divide is in the divider or entering it
  input  logic       div_req,
  input  logic [4:0] div_fd,
  output logic       div_grant,
  // WF stage
  output logic       wf_we,
  output logic [4:0] wf_fd,
  output xw_e        wf_xw,
  // instruction that reaches WF next cycle
  output logic       nx_we,
  output logic [4:0] nx_fd,
  // occupancy of every entry, for observation
  output logic [6:0] slot_busy
);
  typedef struct packed {
    logic       we;
    logic [4:0] fd;
    xw_e        xw;
  } slot_t;

  localparam int unsigned DEPTH = 7;

  slot_t ch [DEPTH];

  assign stall_wf  = (id_uses_add && ch[5].we) || (id_fp_load && ch[3].we);
  assign div_grant = div_req && !ch[1].we;

  logic order_mul, order_add, order_load, div_pending;
  assign div_pending = div_inflight && !div_grant;
  assign order_mul   = div_pending;
  assign order_add   = div_pending || ch[6].we || ch[5].we;
  assign order_load  = order_add || ch[4].we || ch[3].we;
  assign stall_order = IN_ORDER_WF &&
                       ((id_uses_mul && order_mul) || (id_uses_add && order_add) ||
                        (id_fp_load && order_load));

  // entries whose write would land after that of the instruction in ID
  logic [DEPTH-1:0] hit, later, kill;
  slot_t            chk [DEPTH];
  always_comb
    for (int k = 0; k < DEPTH; k++) begin
      hit[k]   = ch[k].we && ch[k].fd == id_fd;
      later[k] = (id_uses_add && k >= 5) || (id_fp_load && k >= 3);
    end
  // kill depends on id_go, which depends on waw_above: kept in its own block
  assign kill = (WAW_SUPPRESS && id_go) ? (hit & later) : '0;
  always_comb
    for (int k = 0; k < DEPTH; k++) begin
      chk[k]    = ch[k];
      chk[k].we = ch[k].we && !kill[k];
    end
  assign waw_above  = |(hit & later);
  assign waw_cancel = |kill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) ch[k] <= '{we: 1'b0, fd: 5'd0, xw: XW_LOAD};
    end else begin
      ch[6] <= '{we: id_go && id_uses_mul, fd: id_fd, xw: XW_MUL};
      ch[5] <= chk[6];
      ch[4] <= (id_go && id_uses_add) ? '{we: 1'b1, fd: id_fd, xw: XW_ADD} : chk[5];
      ch[3] <= chk[4];
      ch[2] <= (id_go && id_fp_load)  ? '{we: 1'b1, fd: id_fd, xw: XW_LOAD} : chk[3];
      ch[1] <= ch[2];
      ch[0] <= div_grant ? '{we: 1'b1, fd: div_fd, xw: XW_DIV} : ch[1];
    end
  end

  assign wf_we = ch[0].we;
  assign wf_fd = ch[0].fd;
  assign wf_xw = ch[0].xw;
  assign nx_we = ch[1].we;
  assign nx_fd = ch[1].fd;

  always_comb
    for (int k = 0; k < DEPTH; k++) slot_busy[k] = ch[k].we;

  // An instruction is only let out of ID into a free WF slot.
  always_ff @(posedge clk)
    if (rst_n) begin
      assert (!(id_go && id_uses_add && ch[5].we))
        else $error("fp_wf_ctrl: add issued into an occupied WF slot");
      assert (!(id_go && id_fp_load && ch[3].we))
        else $error("fp_wf_ctrl: load issued into an occupied WF slot");
    end

endmodule
