// int_hazard_unit: interlocks and bypass selection for the integer pipeline.
//
// Bypass (EX stage): each ALU operand, and the store data carried to ME,
// comes from the ALU result in the EX/ME latch when the instruction in ME
// writes the register, else from the WB value when the instruction in WB
// writes it, else from the value read in ID. Register 0 is never bypassed.
//
// Stalls (ID stage, combinational):
//  - load-use: the instruction in EX is lw and writes a register that the
//    instruction in ID reads; its data exists only once the load is in WB.
//  - branch operands: beq/bne compare the register-file outputs in ID, which
//    has no bypass, so a branch waits while an instruction in EX or ME still
//    has to write one of its operands (WB writes before ID reads).
module int_hazard_unit
  import mips_fp_pkg::*;
(
  // ID
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       id_reads_rs,
  input  logic       id_reads_rt,
  input  logic       id_branch,
  // EX
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic [4:0] ex_dst,
  input  logic       ex_we,
  input  logic       ex_load,
  // ME
  input  logic [4:0] me_dst,
  input  logic       me_we,
  // WB
  input  logic [4:0] wb_dst,
  input  logic       wb_we,
  output fwd_e       fwd_a,
  output fwd_e       fwd_b,
  output logic       stall_load_use,
  output logic       stall_branch
);
  function automatic fwd_e pick(input logic [4:0] r);
    if (r != 5'd0 && me_we && me_dst == r)      return FWD_ME;
    else if (r != 5'd0 && wb_we && wb_dst == r) return FWD_WB;
    else                                        return FWD_REG;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);

  logic rs_in_ex, rt_in_ex, rs_in_me, rt_in_me;

  always_comb begin
    rs_in_ex = id_reads_rs && id_rs != 5'd0 && ex_we && ex_dst == id_rs;
    rt_in_ex = id_reads_rt && id_rt != 5'd0 && ex_we && ex_dst == id_rt;
    rs_in_me = id_reads_rs && id_rs != 5'd0 && me_we && me_dst == id_rs;
    rt_in_me = id_reads_rt && id_rt != 5'd0 && me_we && me_dst == id_rt;
    stall_load_use = ex_load && (rs_in_ex || rt_in_ex);
    stall_branch   = id_branch && (rs_in_ex || rt_in_ex || rs_in_me || rt_in_me);
  end
endmodule
