// tb_int_alu: every ALU operation on random and corner operands, compared
// with results computed here.
module tb_int_alu;
  import mips_fp_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y, e;
  logic [4:0]  shamt;
  int_alu dut (.*);
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      op = alu_op_e'(n % 10);
      a = (n % 7 == 0) ? 32'h8000_0000 : $urandom;
      b = (n % 11 == 0) ? 32'h7fff_ffff : $urandom;
      shamt = 5'($urandom);
      unique case (op)
        ALU_ADD:   e = a + b;
        ALU_SUB:   e = a + ~b + 32'd1;
        ALU_AND:   e = a & b;
        ALU_OR:    e = a | b;
        ALU_XOR:   e = a ^ b;
        ALU_NOR:   e = ~a & ~b;
        ALU_SLT:   e = (a[31] != b[31]) ? 32'(a[31]) : 32'(a < b);
        ALU_SLL:   begin e = b; repeat (shamt) e = {e[30:0], 1'b0}; end
        ALU_SRL:   begin e = b; repeat (shamt) e = {1'b0, e[31:1]}; end
        default:   e = b;
      endcase
      #1;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h: got %h expected %h", op.name(), a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
