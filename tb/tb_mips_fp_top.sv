// tb_mips_fp_top: end-to-end test of the pipeline at its default sizes.
// A program is assembled here, loaded into the instruction memory while
// reset is held, and run to its final self-loop. It
//  - builds eight binary32 constants with lui/ori, stores them with sw and
//    loads them into f1..f8 with lwc1 (integer bypass, FP load path);
//  - issues mul.s / addi / add.s, where the add would reach WF in the same
//    cycle as the multiply: exactly one WF-hazard stall cycle is expected;
//  - chains add.s/sub.s on the multiply result (FP RAW stalls, WF bypass);
//  - writes one register with mul.s then add.s (the multiply's write is
//    cancelled), and again with two nops in between (WAW stall: the
//    multiply is too far on to be cancelled);
//  - makes a load-use stall and a branch-operand stall;
//  - issues two div.s back to back (divider-busy stall) and then 40
//    independent add.s, so the second divide finishes while WF is taken
//    every cycle and has to wait;
//  - runs the loop  addi t0,t0,-1 / mul.s f2,f2,f1 / bne t0,0 / lwc1 f1
//    (delay slot) six times. Its loop-carried multiply takes f2 from the WF
//    bypass, so the multiplies must leave ID exactly 6 cycles apart,
//    4 instructions per 6 cycles.
// All FP and integer results are compared with values computed here with
// double-precision arithmetic rounded to binary32, and every interlock and
// bypass must have acted at least once.
module tb_mips_fp_top;
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
  logic ev_stall_order, ev_waw_suppress;
  logic ev_issue, ev_stall_wf, ev_stall_fp_raw, ev_stall_fp_waw, ev_stall_div;
  logic ev_stall_load_use, ev_stall_branch, ev_fp_bypass, ev_int_bypass;
  logic ev_div_wait, ev_fp_write, div_busy_o;
  logic [6:0] wf_slots_o;

  mips_fp_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- program ----------------
  logic [31:0] prog [$];
  logic [31:0] K [8];
  localparam int N_LOOP = 6;
  int end_pc, loop_pc;
  logic [31:0] add_f11, mul_loop;

  initial begin
    real kr [8] = '{1.5, 2.25, -3.125, 0.7, 10.1, 3.3, 7.0, 0.3};
    for (int i = 0; i < 8; i++) K[i] = r2f(kr[i]);
    for (int i = 0; i < 8; i++) begin
      prog.push_back(a_lui(8, int'(K[i][31:16])));
      prog.push_back(a_ori(8, 8, int'(K[i][15:0])));
      prog.push_back(a_sw(8, 'h100 + 4 * i, 0));
    end
    for (int i = 0; i < 8; i++) prog.push_back(a_lwc1(i + 1, 'h100 + 4 * i, 0));
    // WF structural hazard (mul two ahead of add)
    prog.push_back(a_muls(10, 1, 2));
    prog.push_back(a_addi(9, 0, 1));
    add_f11 = a_adds(11, 3, 4);
    prog.push_back(add_f11);
    // RAW chain through the WF bypass
    prog.push_back(a_adds(12, 10, 3));
    prog.push_back(a_subs(13, 12, 4));
    // WAW
    prog.push_back(a_muls(15, 1, 2));
    prog.push_back(a_adds(15, 3, 4));
    prog.push_back(a_muls(14, 1, 2));
    prog.push_back(a_nop());
    prog.push_back(a_nop());
    prog.push_back(a_adds(14, 5, 6));
    // integer load-use
    prog.push_back(a_lw(10, 'h100, 0));
    prog.push_back(a_addi(11, 10, 1));
    // divides
    prog.push_back(a_divs(16, 7, 8));
    prog.push_back(a_divs(17, 1, 8));
    for (int i = 0; i < 40; i++)
      prog.push_back(a_adds(20 + i % 8, 1 + i % 8, 1 + (i + 3) % 8));
    // the loop
    prog.push_back(a_addi(8, 0, N_LOOP));
    prog.push_back(a_addi(9, 0, 'h100));
    prog.push_back(a_lwc1(2, 'h108, 0));
    prog.push_back(a_lwc1(1, 'h104, 0));
    loop_pc = prog.size();
    prog.push_back(a_addi(8, 8, -1));
    mul_loop = a_muls(2, 2, 1);
    prog.push_back(mul_loop);
    prog.push_back(a_bne(8, 0, loop_pc - (prog.size() + 1)));
    prog.push_back(a_lwc1(1, 4, 9));
    end_pc = prog.size();
    prog.push_back(a_j(end_pc));
    prog.push_back(a_nop());
  end

  // ---------------- event counters ----------------
  int n_issue, n_wf, n_raw, n_waw, n_div, n_lu, n_br, n_fbyp, n_ibyp, n_dwait, n_fw, n_sup;
  int f11_wf_stalls;
  longint mul_issue [$];

  always @(posedge clk) if (rst_n) begin
    n_issue += int'(ev_issue);
    n_wf    += int'(ev_stall_wf);
    n_raw   += int'(ev_stall_fp_raw);
    n_waw   += int'(ev_stall_fp_waw);
    n_div   += int'(ev_stall_div);
    n_lu    += int'(ev_stall_load_use);
    n_br    += int'(ev_stall_branch);
    n_fbyp  += int'(ev_fp_bypass);
    n_ibyp  += int'(ev_int_bypass);
    n_dwait += int'(ev_div_wait);
    n_fw    += int'(ev_fp_write);
    n_sup   += int'(ev_waw_suppress);
    if (dut.id_ir == add_f11 && ev_stall_wf) f11_wf_stalls++;
    if (dut.id_ir == mul_loop && ev_issue) mul_issue.push_back(cycle);
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- run ----------------
  logic [31:0] ef [32];
  logic [31:0] f2v;

  initial begin
    prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    dbg_gpr_addr = '0; dbg_fpr_addr = '0; dbg_mem_addr = '0;
    repeat (2) @(posedge clk);
    // fill the whole instruction memory: unused words are nops
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 10'(a);
      prog_data = (a < prog.size()) ? prog[a] : a_nop();
    end
    @(negedge clk) prog_we = 1'b0;
    @(negedge clk) rst_n = 1'b1;

    wait (pc_o == 30'(end_pc));
    repeat (60) @(posedge clk);
    @(negedge clk);

    // expected FP registers
    for (int i = 0; i < 32; i++) ef[i] = 32'd0;
    for (int i = 0; i < 8; i++) ef[i + 1] = K[i];
    ef[10] = ref_mul(K[0], K[1]);
    ef[11] = ref_add(K[2], K[3]);
    ef[12] = ref_add(ef[10], K[2]);
    ef[13] = ref_sub(ef[12], K[3]);
    ef[15] = ref_add(K[2], K[3]);
    ef[14] = ref_add(K[4], K[5]);
    ef[16] = ref_div(K[6], K[7]);
    ef[17] = ref_div(K[0], K[7]);
    for (int i = 0; i < 40; i++) ef[20 + i % 8] = ref_add(K[i % 8], K[(i + 3) % 8]);
    f2v = K[2];
    for (int i = 0; i < N_LOOP; i++) f2v = ref_mul(f2v, K[1]);
    ef[2] = f2v;
    ef[1] = K[1];
    for (int i = 0; i < 32; i++) begin
      dbg_fpr_addr = 5'(i);
      #1 check($sformatf("f%0d", i), dbg_fpr_data, ef[i]);
    end
    dbg_gpr_addr = 8;  #1 check("r8 (t0)", dbg_gpr_data, 32'd0);
    dbg_gpr_addr = 9;  #1 check("r9 (t1)", dbg_gpr_data, 32'h100);
    dbg_gpr_addr = 10; #1 check("r10", dbg_gpr_data, K[0]);
    dbg_gpr_addr = 11; #1 check("r11", dbg_gpr_data, K[0] + 32'd1);
    for (int i = 0; i < 8; i++) begin
      dbg_mem_addr = 10'(('h100 >> 2) + i);
      #1 check($sformatf("mem[%0d]", i), dbg_mem_data, K[i]);
    end

    // timing: the doc's one-cycle WF stall, and 6-cycle loop iterations
    checks++;
    if (f11_wf_stalls != 1) begin
      failures++;
      $display("FAIL add.s after mul.s stalled %0d cycles for WF, expected 1", f11_wf_stalls);
    end
    checks++;
    if (mul_issue.size() != N_LOOP) begin
      failures++;
      $display("FAIL loop multiply issued %0d times, expected %0d", mul_issue.size(), N_LOOP);
    end
    for (int i = 1; i < mul_issue.size(); i++) begin
      checks++;
      if (mul_issue[i] - mul_issue[i - 1] != 6) begin
        failures++;
        $display("FAIL loop iteration %0d took %0d cycles, expected 6", i, mul_issue[i] - mul_issue[i - 1]);
      end
    end

    // every mechanism must have acted
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_wf, n_raw, n_waw, n_div, n_lu, n_br, n_fbyp, n_ibyp, n_dwait, n_fw, n_sup};
      nm = '{"WF stall", "FP RAW stall", "FP WAW stall", "divider-busy stall",
                         "load-use stall", "branch stall", "FP WF bypass", "integer bypass",
                         "divide waiting for WF", "FP writes", "WAW write cancelled"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("  %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", nm[i]);
        end
      end
    end
    $display("  instructions issued %0d in %0d cycles", n_issue, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
