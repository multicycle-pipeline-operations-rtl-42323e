// int_alu: the combinational integer ALU of the EX stage.
// Operations: add, subtract, and, or, xor, nor, set-less-than (signed),
// shift left/right logical by shamt, and pass-b (used by lui, whose operand
// b is the immediate already shifted into the upper half). Overflow traps
// of add/sub are not modelled; add and addu behave alike.
module int_alu
  import mips_fp_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLL:   y = b << shamt;
      ALU_SRL:   y = b >> shamt;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
