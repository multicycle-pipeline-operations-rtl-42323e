// tb_int_hazard_unit: random register numbers (drawn from a few registers so
// that matches are frequent) for the instructions in ID, EX, ME and WB,
// checked against the rules written out here: bypass from ME before WB,
// never for register 0; load-use stall when EX holds a load whose
// destination ID reads; branch stall when EX or ME will still write an
// operand of a branch in ID.
module tb_int_hazard_unit;
  import mips_fp_pkg::*;
  logic [4:0] id_rs, id_rt, ex_rs, ex_rt, ex_dst, me_dst, wb_dst;
  logic id_reads_rs, id_reads_rt, id_branch, ex_we, ex_load, me_we, wb_we;
  fwd_e fwd_a, fwd_b;
  logic stall_load_use, stall_branch;
  int_hazard_unit dut (.*);
  int checks = 0, failures = 0;
  int seen_lu = 0, seen_br = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  function automatic fwd_e ref_fwd(input logic [4:0] r);
    if (r == 0) return FWD_REG;
    if (me_we && me_dst == r) return FWD_ME;
    if (wb_we && wb_dst == r) return FWD_WB;
    return FWD_REG;
  endfunction

  function automatic bit writes(input logic we, input logic [4:0] dst, r, input logic rd);
    return rd && r != 0 && we && dst == r;
  endfunction

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit lu, br;
    for (int n = 0; n < 5000; n++) begin
      {id_rs, id_rt, ex_rs, ex_rt} = {5'($urandom_range(3, 0)), 5'($urandom_range(3, 0)),
                                      5'($urandom_range(3, 0)), 5'($urandom_range(3, 0))};
      {ex_dst, me_dst, wb_dst} = {5'($urandom_range(3, 0)), 5'($urandom_range(3, 0)), 5'($urandom_range(3, 0))};
      {id_reads_rs, id_reads_rt, id_branch, ex_we, me_we, wb_we} = 6'($urandom);
      ex_load = ex_we & 1'($urandom);
      #1;
      lu = ex_load && (writes(ex_we, ex_dst, id_rs, id_reads_rs) || writes(ex_we, ex_dst, id_rt, id_reads_rt));
      br = id_branch && (writes(ex_we, ex_dst, id_rs, id_reads_rs) || writes(ex_we, ex_dst, id_rt, id_reads_rt) ||
                         writes(me_we, me_dst, id_rs, id_reads_rs) || writes(me_we, me_dst, id_rt, id_reads_rt));
      check("fwd_a", int'(fwd_a), int'(ref_fwd(ex_rs)));
      check("fwd_b", int'(fwd_b), int'(ref_fwd(ex_rt)));
      check("stall_load_use", int'(stall_load_use), int'(lu));
      check("stall_branch", int'(stall_branch), int'(br));
      seen_lu += int'(lu);
      seen_br += int'(br);
      #9;
    end
    check("load-use cases seen", int'(seen_lu > 0), 1);
    check("branch cases seen", int'(seen_br > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
