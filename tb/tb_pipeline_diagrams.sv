// tb_pipeline_diagrams: replays the short instruction sequences used to
// explain the pipeline and checks, cycle by cycle, when each result is
// written in WF, counted from the fetch (IF) of the first instruction of
// the sequence:
//  A  four independent-then-dependent adds:
//       add.s f10,f2,f3 / add.s f11,f4,f5 / add.s f12,f6,f7 / add.s f13,f12,f8
//     WF in cycles 6, 7, 8 and 12 (the last waits for f12 and takes it from
//     the WF bypass in cycle 8).
//  B  mul.s f14,f1,f2 / addi r1,r1,1 / add.s f15,f3,f4: the add would reach
//     WF together with the multiply, is held one cycle in ID: WF 8 and 9.
//  C  div.s f16,f1,f2 / div.s f17,f3,f4 on the unpipelined divider: the
//     second waits in ID until the first enters WF: WF 27 and 52.
//  E  mul.s f18,f1,f2 / add.s f1,f3,f4: no WAR hazard, the add completes
//     first (WF 7, before the multiply at 8) and the multiply used the old f1.
//  F  div.s f19,f1,f2 / add.s f20,f3,f4: the add overtakes the divide
//     (WF 7, divide at 27).
//  G  mul.s f21,f1,f2 / add.s f21,f3,f4: WAW with no read in between; the
//     multiply's write is cancelled, f21 is written once, by the add, at 7.
// A second copy of the pipeline, built with in-order FP completion (the
// stall-based way to precise exceptions), runs the same program: there E
// becomes multiply WF 8, add WF 9 (the add is held two cycles in ID) and F
// becomes divide WF 27, add WF 31 (the add leaves ID in the cycle the divide
// is granted WF); A, B and C are unchanged. In G the add is held until the
// multiply is one cycle from WF, so f21 is written twice, at 8 and 12.
// Sequences are separated by nops so that each starts with an empty
// pipeline. Values are checked too.
module tb_pipeline_diagrams;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data;
  logic [4:0]  dbg_gpr_addr, dbg_fpr_addr;
  logic [31:0] dbg_gpr_data, dbg_fpr_data, dbg_mem_data;
  logic [9:0]  dbg_mem_addr;
  logic [29:0] pc_o;
  logic ev_issue, ev_stall_wf, ev_stall_fp_raw, ev_stall_fp_waw, ev_stall_div;
  logic ev_stall_load_use, ev_stall_branch, ev_fp_bypass, ev_int_bypass;
  logic ev_div_wait, ev_fp_write, div_busy_o;
  logic ev_stall_order, ev_waw_suppress;
  logic [6:0] wf_slots_o;

  mips_fp_top dut (.*);

  // in-order completion copy: same program and inputs, own outputs
  logic [31:0] io_gpr_data, io_fpr_data, io_mem_data;
  logic [29:0] io_pc;
  logic io_waw_sup;
  logic io_issue, io_stall_wf, io_stall_raw, io_stall_waw, io_stall_div, io_stall_order;
  logic io_stall_lu, io_stall_br, io_fp_byp, io_int_byp, io_div_wait, io_fp_write, io_div_busy;
  logic [6:0] io_slots;
  mips_fp_top #(.IN_ORDER_WF(1'b1)) dut_io (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .dbg_gpr_addr, .dbg_gpr_data(io_gpr_data), .dbg_fpr_addr, .dbg_fpr_data(io_fpr_data),
    .dbg_mem_addr, .dbg_mem_data(io_mem_data), .pc_o(io_pc),
    .ev_issue(io_issue), .ev_stall_wf(io_stall_wf), .ev_stall_fp_raw(io_stall_raw),
    .ev_stall_fp_waw(io_stall_waw), .ev_stall_div(io_stall_div),
    .ev_stall_order(io_stall_order), .ev_waw_suppress(io_waw_sup), .ev_stall_load_use(io_stall_lu),
    .ev_stall_branch(io_stall_br), .ev_fp_bypass(io_fp_byp), .ev_int_bypass(io_int_byp),
    .ev_div_wait(io_div_wait), .ev_fp_write(io_fp_write), .div_busy_o(io_div_busy),
    .wf_slots_o(io_slots)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [31:0] prog [$];
  logic [31:0] K [8];
  int seg_pc [6];
  int end_pc;

  task automatic gap();
    repeat (60) prog.push_back(a_nop());
  endtask

  initial begin
    real kr [8] = '{1.5, 2.25, -3.125, 0.7, 10.1, 3.3, 7.0, 0.3};
    for (int i = 0; i < 8; i++) K[i] = r2f(kr[i]);
    for (int i = 0; i < 8; i++) begin
      prog.push_back(a_lui(8, int'(K[i][31:16])));
      prog.push_back(a_ori(8, 8, int'(K[i][15:0])));
      prog.push_back(a_sw(8, 'h100 + 4 * i, 0));
    end
    for (int i = 0; i < 8; i++) prog.push_back(a_lwc1(i + 1, 'h100 + 4 * i, 0));
    gap();
    seg_pc[0] = prog.size();
    prog.push_back(a_adds(10, 2, 3));
    prog.push_back(a_adds(11, 4, 5));
    prog.push_back(a_adds(12, 6, 7));
    prog.push_back(a_adds(13, 12, 8));
    gap();
    seg_pc[1] = prog.size();
    prog.push_back(a_muls(14, 1, 2));
    prog.push_back(a_addi(1, 1, 1));
    prog.push_back(a_adds(15, 3, 4));
    gap();
    seg_pc[2] = prog.size();
    prog.push_back(a_divs(16, 1, 2));
    prog.push_back(a_divs(17, 3, 4));
    gap();
    seg_pc[3] = prog.size();
    prog.push_back(a_muls(18, 1, 2));
    prog.push_back(a_adds(1, 3, 4));
    gap();
    seg_pc[4] = prog.size();
    prog.push_back(a_divs(19, 1, 2));
    prog.push_back(a_adds(20, 3, 4));
    gap();
    seg_pc[5] = prog.size();
    prog.push_back(a_muls(21, 1, 2));
    prog.push_back(a_adds(21, 3, 4));
    gap();
    end_pc = prog.size();
    prog.push_back(a_j(end_pc));
    prog.push_back(a_nop());
  end

  // IF cycle of each sequence, WF cycle of each FP register (last write)
  longint seg_if [6], io_seg_if [6];
  int n_wr21 = 0, io_n_wr21 = 0;
  longint wf_at [32], io_wf_at [32];
  int n_order = 0, io_n_order = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 6; s++) begin
      if (pc_o == 30'(seg_pc[s]) && seg_if[s] < 0) seg_if[s] = cycle;
      if (io_pc == 30'(seg_pc[s]) && io_seg_if[s] < 0) io_seg_if[s] = cycle;
    end
    if (ev_fp_write) wf_at[dut.wf_fd] = cycle;
    if (ev_fp_write && dut.wf_fd == 5'd21) n_wr21++;
    if (io_fp_write && dut_io.wf_fd == 5'd21) io_n_wr21++;
    if (io_fp_write) io_wf_at[dut_io.wf_fd] = cycle;
    n_order    += int'(ev_stall_order);
    io_n_order += int'(io_stall_order);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired pc %0d io_pc %0d end %0d", pc_o, io_pc, end_pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin seg_if[s] = -1; io_seg_if[s] = -1; end
    for (int r = 0; r < 32; r++) begin wf_at[r] = -1; io_wf_at[r] = -1; end
    prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    dbg_gpr_addr = '0; dbg_fpr_addr = '0; dbg_mem_addr = '0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 10'(a);
      prog_data = (a < prog.size()) ? prog[a] : a_nop();
    end
    @(negedge clk) prog_we = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    wait (pc_o == 30'(end_pc));
    wait (io_pc == 30'(end_pc));
    repeat (10) @(posedge clk);
    @(negedge clk);

    check("A add f10 WF", wf_at[10] - seg_if[0], 6);
    check("A add f11 WF", wf_at[11] - seg_if[0], 7);
    check("A add f12 WF", wf_at[12] - seg_if[0], 8);
    check("A dependent add f13 WF", wf_at[13] - seg_if[0], 12);
    check("B mul f14 WF", wf_at[14] - seg_if[1], 8);
    check("B add f15 WF (one stall)", wf_at[15] - seg_if[1], 9);
    check("C div f16 WF", wf_at[16] - seg_if[2], 27);
    check("C div f17 WF", wf_at[17] - seg_if[2], 52);
    check("E mul f18 WF", wf_at[18] - seg_if[3], 8);
    check("E add f1 WF (completes first)", wf_at[1] - seg_if[3], 7);
    check("F div f19 WF", wf_at[19] - seg_if[4], 27);
    check("F add f20 WF (overtakes)", wf_at[20] - seg_if[4], 7);
    check("no order stalls by default", n_order, 0);
    check("G add f21 WF", wf_at[21] - seg_if[5], 7);
    check("G f21 written once", n_wr21, 1);

    check("in-order A add f10 WF", io_wf_at[10] - io_seg_if[0], 6);
    check("in-order A add f11 WF", io_wf_at[11] - io_seg_if[0], 7);
    check("in-order A add f12 WF", io_wf_at[12] - io_seg_if[0], 8);
    check("in-order A add f13 WF", io_wf_at[13] - io_seg_if[0], 12);
    check("in-order B mul f14 WF", io_wf_at[14] - io_seg_if[1], 8);
    check("in-order B add f15 WF", io_wf_at[15] - io_seg_if[1], 9);
    check("in-order C div f16 WF", io_wf_at[16] - io_seg_if[2], 27);
    check("in-order C div f17 WF", io_wf_at[17] - io_seg_if[2], 52);
    check("in-order E mul f18 WF", io_wf_at[18] - io_seg_if[3], 8);
    check("in-order E add f1 WF (after the multiply)", io_wf_at[1] - io_seg_if[3], 9);
    check("in-order F div f19 WF", io_wf_at[19] - io_seg_if[4], 27);
    check("in-order F add f20 WF (after the divide)", io_wf_at[20] - io_seg_if[4], 31);
    check("in-order order stalls seen", int'(io_n_order > 0), 1);
    check("in-order G add f21 WF", io_wf_at[21] - io_seg_if[5], 12);
    check("in-order G f21 written twice", io_n_wr21, 2);

    begin
      logic [31:0] e [32];
      e[10] = ref_add(K[1], K[2]);
      e[11] = ref_add(K[3], K[4]);
      e[12] = ref_add(K[5], K[6]);
      e[13] = ref_add(e[12], K[7]);
      e[14] = ref_mul(K[0], K[1]);
      e[15] = ref_add(K[2], K[3]);
      e[16] = ref_div(K[0], K[1]);
      e[17] = ref_div(K[2], K[3]);
      e[18] = ref_mul(K[0], K[1]);   // old f1
      e[1]  = ref_add(K[2], K[3]);
      e[19] = ref_div(e[1], K[1]);   // f1 now holds the add of E
      e[20] = ref_add(K[2], K[3]);
      e[21] = ref_add(K[2], K[3]);
      foreach (e[r]) if (r == 1 || (r >= 10 && r <= 21)) begin
        dbg_fpr_addr = 5'(r);
        #1;
        checks += 2;
        if (dbg_fpr_data !== e[r]) begin
          failures++;
          $display("FAIL f%0d: got %h expected %h", r, dbg_fpr_data, e[r]);
        end
        if (io_fpr_data !== e[r]) begin
          failures++;
          $display("FAIL in-order f%0d: got %h expected %h", r, io_fpr_data, e[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
