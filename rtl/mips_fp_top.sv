// mips_fp_top: a five-stage MIPS integer pipeline (IF ID EX ME WB) extended
// with a floating-point pipeline: a separate FP register file, a fully
// pipelined 4-stage adder (A1..A4, add.s/sub.s), a fully pipelined 6-stage
// multiplier (M1..M6, mul.s), an unpipelined 25-cycle divider (div.s), and
// an FP writeback stage WF that is separate from the integer WB.
//
// Instruction timing (cycle 0 = IF):
//   integer  IF ID EX ME WB
//   lwc1     IF ID EX ME WF          (load data from the ME/WB latch)
//   add.s    IF ID A1 A2 A3 A4 WF
//   mul.s    IF ID M1 M2 M3 M4 M5 M6 WF
//   div.s    IF ID DIV x25 WF        (later if WF is busy)
// Instructions leave ID in program order; nothing after ID ever stalls, so
// every interlock is a stall of IF and ID that sends a bubble onward:
//   - WF structural hazard (fp_wf_ctrl): an add or FP load whose WF cycle is
//     already reserved by an earlier, longer operation;
//   - FP RAW: a source register with a pending write that cannot be taken
//     from the WF bypass (fp_scoreboard ready bits);
//   - FP WAW: a destination with a pending write that would happen after
//     this instruction's own write, unless that write can be cancelled
//     (WAW_SUPPRESS, default 1: fp_wf_ctrl clears its we and the add or
//     load issues at once); only writes still in the chain above the new
//     instruction's insertion point can be cancelled, not a divide;
//   - divider busy (its ready-next-cycle signal is 0);
//   - only with IN_ORDER_WF = 1: an FP instruction that would write WF
//     before an older one (in-order completion for precise exceptions);
//   - integer load-use and branch-operand hazards (int_hazard_unit).
// Bypasses: the integer EX operands from ME and WB; the FP unit inputs
// (fsv/ftv) from the value being written in WF.
// Branches (beq, bne) are resolved in ID with one delay slot; j uses the
// upper PC bits 29:26 and instruction bits 25:0. The PC is a word address.
//
// The stage structure, the FP unit latencies, the WF control chain and its
// stall logic follow the classroom pipeline this design reproduces. The
// instruction subset, the divider's route to WF, the 2-bit WAW-aware
// scoreboard, memory sizes and the program/observation ports are this
// design's own choices. FP stores and moves between register files are not
// part of it.
//
// Ports: prog_* writes the instruction memory (hold rst_n low while
// loading); dbg_* read integer and FP registers and data memory; the ev_*
// outputs pulse when a mechanism acts, for performance counting.
// IN_ORDER_WF (default 0) selects in-order FP completion, the first of the
// precise-exception methods of the classroom design; the pipeline has no
// exception sources itself, so only the ordering is built.
module mips_fp_top
  import mips_fp_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          IN_ORDER_WF  = 1'b0,
  parameter bit          WAW_SUPPRESS = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                   prog_data,
  // observation
  input  logic [4:0]                    dbg_gpr_addr,
  output logic [31:0]                   dbg_gpr_data,
  input  logic [4:0]                    dbg_fpr_addr,
  output logic [31:0]                   dbg_fpr_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  output logic [31:0]                   dbg_mem_data,
  output logic [29:0]                   pc_o,
  // events
  output logic        ev_issue,          // an instruction left ID
  output logic        ev_stall_wf,       // ID stalled: WF structural hazard
  output logic        ev_stall_fp_raw,   // ID stalled: FP operand not ready
  output logic        ev_stall_fp_waw,   // ID stalled: FP destination pending
  output logic        ev_stall_div,      // ID stalled: divider not ready
  output logic        ev_stall_order,    // ID stalled: in-order FP completion
  output logic        ev_waw_suppress,   // an older FP write was cancelled (WAW)
  output logic        ev_stall_load_use, // ID stalled: integer load-use
  output logic        ev_stall_branch,   // ID stalled: branch operand pending
  output logic        ev_fp_bypass,      // an FP unit took an operand from WF
  output logic        ev_int_bypass,     // EX took an operand from ME or WB
  output logic        ev_div_wait,       // a finished divide waited for WF
  output logic        ev_fp_write,       // WF wrote the FP register file
  output logic        div_busy_o,        // the divider holds an operation
  output logic [6:0]  wf_slots_o         // WF reservations, bit k = WF in k cycles
);

  // =========================== IF ===========================
  logic [29:0] pc, pc_next, if_npc;
  logic [31:0] if_ir;
  logic        stall;

  imem #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .rdata(if_ir),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  assign if_npc = pc + 30'd1;

  // IF/ID latch
  logic [29:0] id_npc;
  logic [31:0] id_ir;

  // =========================== ID ===========================
  dec_t        d;
  logic [4:0]  id_rs, id_rt, id_fs, id_ft;
  logic [31:0] id_rsv, id_rtv, id_fsv, id_ftv, id_imm;
  logic        br_taken;
  logic [29:0] br_target, j_target;

  assign d     = decode(id_ir);
  assign id_rs = id_ir[25:21];
  assign id_rt = id_ir[20:16];
  assign id_fs = id_ir[15:11];
  assign id_ft = id_ir[20:16];
  assign id_imm = format_imm(id_ir[15:0], d.imm_kind);

  // WB stage values, declared early for the register file write port
  logic        wb_we, wb_load;
  logic [4:0]  wb_dst;
  logic [31:0] wb_alu, wb_md, wb_val;

  int_regfile u_gpr (
    .clk, .rst_n,
    .ra1(id_rs), .rd1(id_rsv),
    .ra2(id_rt), .rd2(id_rtv),
    .ra3(dbg_gpr_addr), .rd3(dbg_gpr_data),
    .we(wb_we), .wa(wb_dst), .wd(wb_val)
  );

  // WF stage values
  logic        wf_we, nx_we;
  logic [4:0]  wf_fd, nx_fd;
  xw_e         wf_xw;
  logic [31:0] wf_val;

  fp_regfile u_fpr (
    .clk, .rst_n,
    .ra1(id_fs), .rd1(id_fsv),
    .ra2(id_ft), .rd2(id_ftv),
    .ra3(dbg_fpr_addr), .rd3(dbg_fpr_data),
    .we(wf_we), .wa(wf_fd), .wd(wf_val)
  );

  assign br_taken  = (d.is_beq && id_rsv == id_rtv) || (d.is_bne && id_rsv != id_rtv);
  assign br_target = id_npc + 30'(signed'(id_ir[15:0]));
  assign j_target  = {id_npc[29:26], id_ir[25:0]};

  // ---- FP interlocks ----
  logic [31:0] fp_ready, fp_single;
  logic        fp_reads, fp_writes;
  logic        fs_ok, ft_ok, fd_ok;
  logic        stall_fp_raw, stall_fp_waw, stall_wf, stall_div;
  logic        stall_order, waw_above, waw_cancel;
  logic        stall_load_use, stall_branch;
  logic        id_go;

  assign fp_reads  = d.fp_add || d.fp_mul || d.fp_div;
  assign fp_writes = fp_reads || d.fp_load;

  // An operand is usable if no write is pending, or if its single pending
  // write is in WF now (register file write-before-read) or in WF next cycle
  // (WF bypass into the unit's first stage).
  function automatic logic src_ok(input logic [4:0] r);
    return fp_ready[r] ||
           (fp_single[r] && ((wf_we && wf_fd == r) || (nx_we && nx_fd == r)));
  endfunction

  assign fs_ok = src_ok(id_fs);
  assign ft_ok = src_ok(id_ft);
  // A new write to a register may issue while its one pending write is in
  // WF now or next cycle: that write then lands first.
  // With WAW_SUPPRESS the single pending write may also be one that would
  // land after this instruction's: it is cancelled as this one issues.
  assign fd_ok = src_ok(d.fd) || (WAW_SUPPRESS && fp_single[d.fd] && waw_above);

  assign stall_fp_raw = fp_reads && !(fs_ok && ft_ok);
  assign stall_fp_waw = fp_writes && !fd_ok;

  logic div_ready_nc, div_busy;
  logic m1_add, m1_sub, m1_mul, m1_div;   // ID/M1 latch: operation entering the units
  assign stall_div = d.fp_div && !div_ready_nc;

  // ---- EX-stage state needed by the hazard unit ----
  logic [31:0] ex_rsv, ex_rtv, ex_imm;
  logic [4:0]  ex_rs, ex_rt, ex_dst, ex_shamt;
  logic        ex_we, ex_use_imm, ex_mem_rd, ex_mem_wr;
  alu_op_e     ex_alu_op;
  logic [31:0] me_alu, me_rtv;
  logic [4:0]  me_dst;
  logic        me_we, me_mem_rd, me_mem_wr;
  fwd_e        fwd_a, fwd_b;

  int_hazard_unit u_hz (
    .id_rs, .id_rt,
    .id_reads_rs(d.reads_rs), .id_reads_rt(d.reads_rt),
    .id_branch(d.is_beq || d.is_bne),
    .ex_rs, .ex_rt, .ex_dst, .ex_we, .ex_load(ex_mem_rd && ex_we),
    .me_dst, .me_we,
    .wb_dst, .wb_we,
    .fwd_a, .fwd_b, .stall_load_use, .stall_branch
  );

  // ---- WF control chain ----
  logic div_req, div_grant;
  logic [4:0] div_fd;
  logic [6:0] slot_busy;

  fp_wf_ctrl #(.IN_ORDER_WF(IN_ORDER_WF), .WAW_SUPPRESS(WAW_SUPPRESS)) u_wfc (
    .clk, .rst_n,
    .id_uses_mul(d.fp_mul), .id_uses_add(d.fp_add), .id_fp_load(d.fp_load),
    .id_fd(d.fd), .id_go,
    .stall_wf, .stall_order, .waw_above, .waw_cancel,
    .div_inflight(m1_div || div_busy),
    .div_req, .div_fd, .div_grant,
    .wf_we, .wf_fd, .wf_xw,
    .nx_we, .nx_fd,
    .slot_busy
  );

  assign stall = stall_wf || stall_order || stall_fp_raw || stall_fp_waw || stall_div ||
                 stall_load_use || stall_branch;
  assign id_go = !stall;

  fp_scoreboard u_sb (
    .clk, .rst_n,
    // a cancelled write is replaced by the new one: the count stays at 1
    .issue_we(id_go && fp_writes && !waw_cancel), .issue_fd(d.fd),
    .wr_we(wf_we), .wr_fd(wf_fd),
    .ready(fp_ready), .single(fp_single)
  );

  // ---- PC and IF/ID latch ----
  always_comb begin
    if (stall)          pc_next = pc;
    else if (br_taken)  pc_next = br_target;
    else if (d.is_j)    pc_next = j_target;
    else                pc_next = if_npc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      id_npc <= '0;
      id_ir  <= '0;            // sll r0,r0,0: a nop
    end else begin
      pc <= pc_next;
      if (!stall) begin
        id_npc <= if_npc;
        id_ir  <= if_ir;
      end
    end
  end
  assign pc_o = pc;

  // ---- ID/EX latch (integer) and ID/M1 latch (FP operands) ----
  logic [31:0] m1_fsv, m1_ftv;
  logic [4:0]  m1_fs, m1_ft, m1_fd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_rsv <= '0; ex_rtv <= '0; ex_imm <= '0;
      ex_rs <= '0; ex_rt <= '0; ex_dst <= '0; ex_shamt <= '0;
      ex_we <= 1'b0; ex_use_imm <= 1'b0; ex_mem_rd <= 1'b0; ex_mem_wr <= 1'b0;
      ex_alu_op <= ALU_ADD;
      m1_fsv <= '0; m1_ftv <= '0; m1_fs <= '0; m1_ft <= '0; m1_fd <= '0;
      m1_add <= 1'b0; m1_sub <= 1'b0; m1_mul <= 1'b0; m1_div <= 1'b0;
    end else begin
      ex_rsv     <= id_rsv;
      ex_rtv     <= id_rtv;
      ex_imm     <= id_imm;
      ex_rs      <= id_rs;
      ex_rt      <= id_rt;
      ex_dst     <= d.dst;
      ex_shamt   <= id_ir[10:6];
      ex_alu_op  <= d.alu_op;
      ex_use_imm <= d.use_imm;
      m1_fsv     <= id_fsv;
      m1_ftv     <= id_ftv;
      m1_fs      <= id_fs;
      m1_ft      <= id_ft;
      m1_fd      <= d.fd;
      m1_sub     <= d.fp_sub;
      // a stall sends a bubble
      ex_we      <= id_go && d.int_we;
      ex_mem_rd  <= id_go && d.mem_rd;
      ex_mem_wr  <= id_go && d.mem_wr;
      m1_add     <= id_go && d.fp_add;
      m1_mul     <= id_go && d.fp_mul;
      m1_div     <= id_go && d.fp_div;
    end
  end

  // =========================== EX ===========================
  logic [31:0] alu_a, alu_b, st_data, ex_alu;

  always_comb begin
    unique case (fwd_a)
      FWD_ME:  alu_a = me_alu;
      FWD_WB:  alu_a = wb_val;
      default: alu_a = ex_rsv;
    endcase
    unique case (fwd_b)
      FWD_ME:  st_data = me_alu;
      FWD_WB:  st_data = wb_val;
      default: st_data = ex_rtv;
    endcase
    alu_b = ex_use_imm ? ex_imm : st_data;
  end

  int_alu u_alu (.op(ex_alu_op), .a(alu_a), .b(alu_b), .shamt(ex_shamt), .y(ex_alu));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      me_alu <= '0; me_rtv <= '0; me_dst <= '0;
      me_we <= 1'b0; me_mem_rd <= 1'b0; me_mem_wr <= 1'b0;
    end else begin
      me_alu     <= ex_alu;
      me_rtv     <= st_data;
      me_dst     <= ex_dst;
      me_we      <= ex_we;
      me_mem_rd  <= ex_mem_rd;
      me_mem_wr  <= ex_mem_wr;
    end
  end

  // =========================== ME ===========================
  logic [31:0] me_md;

  dmem #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk, .addr(me_alu), .we(me_mem_wr), .wdata(me_rtv), .rdata(me_md),
    .dbg_addr(dbg_mem_addr), .dbg_rdata(dbg_mem_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_alu <= '0; wb_md <= '0; wb_dst <= '0; wb_we <= 1'b0; wb_load <= 1'b0;
    end else begin
      wb_alu  <= me_alu;
      // only loads read memory; other instructions keep MD quiet
      wb_md   <= me_mem_rd ? me_md : '0;
      wb_dst  <= me_dst;
      wb_we   <= me_we;
      wb_load <= me_mem_rd;
    end
  end

  // =========================== WB ===========================
  assign wb_val = wb_load ? wb_md : wb_alu;

  // ====================== FP units (M1/A1/DIV) ======================
  logic [31:0] fp_a, fp_b, add_y, mul_y, div_y;
  logic        byp_a, byp_b;

  assign byp_a = wf_we && wf_fd == m1_fs;
  assign byp_b = wf_we && wf_fd == m1_ft;
  assign fp_a  = byp_a ? wf_val : m1_fsv;
  assign fp_b  = byp_b ? wf_val : m1_ftv;

  fp_adder u_add (.clk, .rst_n, .a(fp_a), .b(fp_b), .sub(m1_sub), .y(add_y));
  fp_multiplier u_mul (.clk, .rst_n, .a(fp_a), .b(fp_b), .y(mul_y));

  fp_divider u_div (
    .clk, .rst_n,
    .start(m1_div), .a(fp_a), .b(fp_b), .tag_in(m1_fd),
    .ready_next_cycle(div_ready_nc), .busy(div_busy),
    .wf_req(div_req), .wf_ack(div_grant),
    .y(div_y), .tag_out(div_fd)
  );

  // =========================== WF ===========================
  always_comb begin
    unique case (wf_xw)
      XW_LOAD: wf_val = wb_md;
      XW_ADD:  wf_val = add_y;
      XW_MUL:  wf_val = mul_y;
      default: wf_val = div_y;
    endcase
  end

  // ---- events ----
  assign ev_issue          = id_go;
  assign ev_stall_wf       = stall_wf;
  assign ev_stall_fp_raw   = stall_fp_raw;
  assign ev_stall_fp_waw   = stall_fp_waw;
  assign ev_stall_div      = stall_div;
  assign ev_stall_order    = stall_order;
  assign ev_waw_suppress   = waw_cancel;
  assign ev_stall_load_use = stall_load_use;
  assign ev_stall_branch   = stall_branch;
  assign ev_fp_bypass      = (m1_add || m1_mul || m1_div) && (byp_a || byp_b);
  assign ev_int_bypass     = (fwd_a != FWD_REG) || (fwd_b != FWD_REG);
  assign ev_div_wait       = div_req && !div_grant;
  assign ev_fp_write       = wf_we;
  assign div_busy_o        = div_busy;
  assign wf_slots_o        = slot_busy;

  // The FP pipeline never holds two writes for one WF cycle.
  always_ff @(posedge clk)
    if (rst_n) assert (!(div_grant && slot_busy[1]))
      else $error("mips_fp_top: divider granted WF while the chain is busy");

endmodule
