// tb_fp_wf_ctrl: drives a random stream of FP multiplies, adds and loads out
// of ID, with random extra stalls and random divider requests, and checks
// the controller against a reservation table indexed by absolute cycle:
// an instruction leaving ID in cycle t writes in WF in cycle t+7 (mul.s),
// t+5 (add.s) or t+3 (lwc1); a granted divide writes in the next cycle.
// Checked every cycle: stall_wf (an add or load whose WF cycle is taken),
// div_grant (WF of next cycle free), and the WF outputs we/fd/xw, plus the
// next-cycle outputs nx_we/nx_fd. A second instance with in-order completion
// enabled sees the same inputs (so holds the same chain) and its
// stall_order is checked against the table: an add is held while a result
// is due in 5 or 6 cycles, a load while one is due in 3..6 cycles, and any
// FP instruction while a divide is in flight and not being granted.
// WAW suppression (on by default) is modelled in the table too: an add
// leaving ID clears a pending write of the same register due in 5 or 6
// cycles, a load one due in 3..6 cycles; waw_above and waw_cancel are
// checked every cycle, and such cancellations must occur.
module tb_fp_wf_ctrl;
  import mips_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       id_uses_mul, id_uses_add, id_fp_load, id_go, stall_wf;
  logic [4:0] id_fd, div_fd, wf_fd, nx_fd;
  logic       div_req, div_grant, wf_we, nx_we;
  xw_e        wf_xw;
  logic [6:0] slot_busy;
  logic       div_inflight, stall_order, io_stall_order, io_stall_wf;
  logic       waw_above, waw_cancel, io_waw_above, io_waw_cancel;
  logic       io_div_grant, io_wf_we, io_nx_we;
  logic [4:0] io_wf_fd, io_nx_fd;
  xw_e        io_wf_xw;
  logic [6:0] io_slot_busy;
  fp_wf_ctrl dut (.*);
  fp_wf_ctrl #(.IN_ORDER_WF(1'b1)) dut_io (
    .clk, .rst_n, .id_uses_mul, .id_uses_add, .id_fp_load, .id_fd, .id_go,
    .stall_wf(io_stall_wf), .stall_order(io_stall_order), .div_inflight,
    .waw_above(io_waw_above), .waw_cancel(io_waw_cancel),
    .div_req, .div_fd, .div_grant(io_div_grant),
    .wf_we(io_wf_we), .wf_fd(io_wf_fd), .wf_xw(io_wf_xw),
    .nx_we(io_nx_we), .nx_fd(io_nx_fd), .slot_busy(io_slot_busy)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_grant = 0, n_wait = 0, n_order = 0, n_kill = 0;

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  localparam int NC = 5000;
  // reservation table: valid, fd, source
  logic       r_v  [NC + 16];
  logic [4:0] r_fd [NC + 16];
  xw_e        r_xw [NC + 16];
  int cyc;

  initial begin
    repeat (NC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind;
    logic extra_stall, exp_stall, exp_order, due_add, due_load, div_pend, exp_above;
    int lo;
    for (int i = 0; i < NC + 16; i++) begin r_v[i] = 1'b0; r_fd[i] = '0; r_xw[i] = XW_LOAD; end
    id_uses_mul = 0; id_uses_add = 0; id_fp_load = 0; id_go = 0; id_fd = 0;
    div_req = 0; div_fd = 0; div_inflight = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NC; cyc++) begin
      // WF outputs of this cycle
      check("wf_we", int'(wf_we), int'(r_v[cyc]));
      if (r_v[cyc]) begin
        check("wf_fd", int'(wf_fd), int'(r_fd[cyc]));
        check("wf_xw", int'(wf_xw), int'(r_xw[cyc]));
      end
      check("nx_we", int'(nx_we), int'(r_v[cyc + 1]));
      if (r_v[cyc + 1]) check("nx_fd", int'(nx_fd), int'(r_fd[cyc + 1]));
      // new ID instruction
      kind = int'($urandom_range(4, 0));
      id_uses_mul = (kind == 1);
      id_uses_add = (kind == 2) || (kind == 4);
      id_fp_load  = (kind == 3);
      id_fd       = 5'($urandom);
      extra_stall = ($urandom_range(9, 0) == 0);
      div_req     = ($urandom_range(3, 0) == 0);
      div_fd      = 5'($urandom);
      div_inflight = div_req || ($urandom_range(3, 0) == 0);
      #1;
      exp_stall = (id_uses_add && r_v[cyc + 5]) || (id_fp_load && r_v[cyc + 3]);
      check("stall_wf", int'(stall_wf), int'(exp_stall));
      id_go = !stall_wf && !extra_stall;
      #1;
      check("div_grant", int'(div_grant), int'(div_req && !r_v[cyc + 1]));
      div_pend  = div_inflight && !(div_req && !r_v[cyc + 1]);
      due_add   = r_v[cyc + 5] || r_v[cyc + 6];
      due_load  = due_add || r_v[cyc + 3] || r_v[cyc + 4];
      exp_order = (id_uses_mul && div_pend) || (id_uses_add && (div_pend || due_add)) ||
                  (id_fp_load && (div_pend || due_load));
      check("stall_order", int'(io_stall_order), int'(exp_order));
      check("stall_order off", int'(stall_order), 0);
      n_order += int'(exp_order);
      // WAW: a pending write of id_fd that would land after this one
      lo = id_uses_add ? 5 : 3;
      exp_above = 1'b0;
      if (id_uses_add || id_fp_load)
        for (int k = lo; k <= 6; k++) if (r_v[cyc + k] && r_fd[cyc + k] == id_fd) exp_above = 1'b1;
      check("waw_above", int'(waw_above), int'(exp_above));
      check("waw_cancel", int'(waw_cancel), int'(exp_above && id_go));
      if (exp_above && id_go) begin
        n_kill++;
        for (int k = lo; k <= 6; k++) if (r_v[cyc + k] && r_fd[cyc + k] == id_fd) r_v[cyc + k] = 1'b0;
      end
      n_stall += int'(exp_stall);
      n_grant += int'(div_grant);
      n_wait  += int'(div_req && !div_grant);
      if (id_go && id_uses_mul) begin r_v[cyc + 7] = 1; r_fd[cyc + 7] = id_fd; r_xw[cyc + 7] = XW_MUL;  end
      if (id_go && id_uses_add) begin r_v[cyc + 5] = 1; r_fd[cyc + 5] = id_fd; r_xw[cyc + 5] = XW_ADD;  end
      if (id_go && id_fp_load)  begin r_v[cyc + 3] = 1; r_fd[cyc + 3] = id_fd; r_xw[cyc + 3] = XW_LOAD; end
      if (div_grant)            begin r_v[cyc + 1] = 1; r_fd[cyc + 1] = div_fd; r_xw[cyc + 1] = XW_DIV; end
      @(negedge clk);
    end
    check("WF stalls seen", int'(n_stall > 0), 1);
    check("divide grants seen", int'(n_grant > 0), 1);
    check("divide waits seen", int'(n_wait > 0), 1);
    check("order stalls seen", int'(n_order > 0), 1);
    check("WAW cancellations seen", int'(n_kill > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
