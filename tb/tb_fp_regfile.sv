// tb_fp_regfile: random writes and reads of the FP register file
// against a reference array. Checks both read ports, the write-before-read
// forwarding of a register written in the same cycle, the observation
// port.
module tb_fp_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic        we;
  fp_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_r [32];
  localparam bit ZERO_REG = 0;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rdref(input logic [4:0] a, input bit fwd);
    if (ZERO_REG && a == 0) return 32'd0;
    if (fwd && we && wa == a) return wd;
    return ref_r[a];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) ref_r[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 4 == 0) ? wa : 5'($urandom); ra3 = 5'($urandom);
      #1;
      check("rd1", rd1, rdref(ra1, 1));
      check("rd2", rd2, rdref(ra2, 1));
      check("rd3", rd3, rdref(ra3, 0));
      if (we && !(ZERO_REG && wa == 0)) ref_r[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
