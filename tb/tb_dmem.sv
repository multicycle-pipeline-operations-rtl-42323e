// tb_dmem: random word writes and reads of the data memory against a
// reference array, using byte addresses (bits 1:0 ignored), with the
// observation port read at the same time.
module tb_dmem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] addr, wdata, rdata, dbg_rdata;
  logic        we;
  logic [9:0]  dbg_addr;
  dmem dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] mem_ref [1024];

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; dbg_addr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; addr = {20'd0, 10'(i), 2'($urandom)}; wdata = $urandom; mem_ref[i] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = 1'($urandom); addr = {20'd0, 10'($urandom), 2'($urandom)}; wdata = $urandom;
      dbg_addr = 10'($urandom);
      #1;
      check("rdata", rdata, mem_ref[addr[11:2]]);
      check("dbg_rdata", dbg_rdata, mem_ref[dbg_addr]);
      if (we) mem_ref[addr[11:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
