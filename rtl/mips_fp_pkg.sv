// mips_fp_pkg: types, opcodes and the instruction decoder shared by the
// classroom MIPS pipeline with floating-point units.
//
// The integer opcodes and field positions follow the MIPS-I encoding (rs in
// 25:21, rt in 20:16, rd in 15:11, immediate in 15:0, jump target in 25:0).
// FP arithmetic uses the COP1 encoding with fmt = S (single precision): fs in
// 15:11 and ft in 20:16 (the two FP register file read ports), fd in 10:6.
// lwc1 writes FP register ft. Only single precision is modelled: double
// operands would need register pairs, which this design leaves out.
//
// xw_e encodes the source chosen by the WF (floating-point writeback)
// multiplexer: load data 0, adder 1, multiplier 2 (the printed constants
// 2'd0, 2'd1 and 2'd2 of the control pipeline); 3 (divider) is this design's
// addition, since the divider's connection to WF is not drawn.
package mips_fp_pkg;


  // Major opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_COP1  = 6'h11;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;
  localparam logic [5:0] OP_LWC1  = 6'h31;

  // R-type function codes (bits 5:0)
  localparam logic [5:0] F_SLL  = 6'h00;
  localparam logic [5:0] F_SRL  = 6'h02;
  localparam logic [5:0] F_ADD  = 6'h20;
  localparam logic [5:0] F_ADDU = 6'h21;
  localparam logic [5:0] F_SUB  = 6'h22;
  localparam logic [5:0] F_SUBU = 6'h23;
  localparam logic [5:0] F_AND  = 6'h24;
  localparam logic [5:0] F_OR   = 6'h25;
  localparam logic [5:0] F_XOR  = 6'h26;
  localparam logic [5:0] F_NOR  = 6'h27;
  localparam logic [5:0] F_SLT  = 6'h2a;

  // COP1 single-precision arithmetic (fmt field 25:21 = 16)
  localparam logic [4:0] FMT_S   = 5'h10;
  localparam logic [5:0] FF_ADD  = 6'h00;
  localparam logic [5:0] FF_SUB  = 6'h01;
  localparam logic [5:0] FF_MUL  = 6'h02;
  localparam logic [5:0] FF_DIV  = 6'h03;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLL, ALU_SRL, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {
    XW_LOAD = 2'd0,
    XW_ADD  = 2'd1,
    XW_MUL  = 2'd2,
    XW_DIV  = 2'd3
  } xw_e;

  // Integer bypass source for an EX-stage operand
  typedef enum logic [1:0] {
    FWD_REG = 2'd0,   // value read in ID
    FWD_ME  = 2'd1,   // ALU result in the EX/ME latch
    FWD_WB  = 2'd2    // writeback value of the ME/WB latch
  } fwd_e;

  typedef enum logic [1:0] {
    IMM_SEXT = 2'd0,
    IMM_ZEXT = 2'd1,
    IMM_LUI  = 2'd2
  } imm_kind_e;

  // Everything ID needs to know about one instruction
  typedef struct packed {
    alu_op_e   alu_op;
    logic      use_imm;
    imm_kind_e imm_kind;
    logic      int_we;     // writes an integer register in WB
    logic [4:0] dst;       // integer destination
    logic      reads_rs;
    logic      reads_rt;
    logic      mem_rd;     // lw or lwc1
    logic      mem_wr;     // sw
    logic      is_beq;
    logic      is_bne;
    logic      is_j;
    logic      fp_load;    // lwc1: "FP load"
    logic      fp_add;     // add.s / sub.s: "uses FP add"
    logic      fp_sub;
    logic      fp_mul;     // mul.s: "uses FP mul"
    logic      fp_div;     // div.s
    logic [4:0] fd;        // FP destination ("decode dest. reg")
  } dec_t;

  function automatic dec_t decode(input logic [31:0] ir);
    dec_t d;
    logic [5:0] op, fn;
    op = ir[31:26];
    fn = ir[5:0];
    d = '0;
    d.alu_op   = ALU_ADD;
    d.imm_kind = IMM_SEXT;
    unique case (op)
      OP_RTYPE: begin
        d.dst = ir[15:11];
        d.reads_rs = 1'b1;
        d.reads_rt = 1'b1;
        d.int_we   = 1'b1;
        unique case (fn)
          F_ADD, F_ADDU: d.alu_op = ALU_ADD;
          F_SUB, F_SUBU: d.alu_op = ALU_SUB;
          F_AND:  d.alu_op = ALU_AND;
          F_OR:   d.alu_op = ALU_OR;
          F_XOR:  d.alu_op = ALU_XOR;
          F_NOR:  d.alu_op = ALU_NOR;
          F_SLT:  d.alu_op = ALU_SLT;
          F_SLL:  begin d.alu_op = ALU_SLL; d.reads_rs = 1'b0; end
          F_SRL:  begin d.alu_op = ALU_SRL; d.reads_rs = 1'b0; end
          default: d.int_we = 1'b0;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        d.dst = ir[20:16];
        d.int_we = 1'b1;
        d.use_imm = 1'b1;
        d.reads_rs = (op != OP_LUI);
        unique case (op)
          OP_SLTI: d.alu_op = ALU_SLT;
          OP_ANDI: begin d.alu_op = ALU_AND; d.imm_kind = IMM_ZEXT; end
          OP_ORI:  begin d.alu_op = ALU_OR;  d.imm_kind = IMM_ZEXT; end
          OP_XORI: begin d.alu_op = ALU_XOR; d.imm_kind = IMM_ZEXT; end
          OP_LUI:  begin d.alu_op = ALU_PASSB; d.imm_kind = IMM_LUI; end
          default: d.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        d.dst = ir[20:16]; d.int_we = 1'b1; d.use_imm = 1'b1;
        d.reads_rs = 1'b1; d.mem_rd = 1'b1;
      end
      OP_LWC1: begin
        d.use_imm = 1'b1; d.reads_rs = 1'b1; d.mem_rd = 1'b1;
        d.fp_load = 1'b1; d.fd = ir[20:16];
      end
      OP_SW: begin
        d.use_imm = 1'b1; d.reads_rs = 1'b1; d.reads_rt = 1'b1; d.mem_wr = 1'b1;
      end
      OP_BEQ: begin d.is_beq = 1'b1; d.reads_rs = 1'b1; d.reads_rt = 1'b1; end
      OP_BNE: begin d.is_bne = 1'b1; d.reads_rs = 1'b1; d.reads_rt = 1'b1; end
      OP_J:   d.is_j = 1'b1;
      OP_COP1: begin
        if (ir[25:21] == FMT_S) begin
          d.fd = ir[10:6];
          unique case (fn)
            FF_ADD: d.fp_add = 1'b1;
            FF_SUB: begin d.fp_add = 1'b1; d.fp_sub = 1'b1; end
            FF_MUL: d.fp_mul = 1'b1;
            FF_DIV: d.fp_div = 1'b1;
            default: ;
          endcase
        end
      end
      default: ;
    endcase
    return d;
  endfunction

  function automatic logic [31:0] format_imm(input logic [15:0] imm,
                                             input imm_kind_e kind);
    unique case (kind)
      IMM_ZEXT: return {16'h0, imm};
      IMM_LUI:  return {imm, 16'h0};
      default:  return {{16{imm[15]}}, imm};
    endcase
  endfunction

endpackage
