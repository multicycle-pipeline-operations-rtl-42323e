// tb_imem: writes every word of the instruction memory with a pattern and
// reads it back through the fetch port, also with address bits above the
// memory size set (they must be ignored).
module tb_imem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [29:0] addr;
  logic [31:0] rdata, wdata;
  logic        we;
  logic [9:0]  waddr;
  imem dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] pat(input int i);
    return 32'(i) * 32'h9e37_79b9 ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; addr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2048; i++) begin
      addr = {20'($urandom), 10'(i)};
      #1;
      checks++;
      if (rdata !== pat(i % 1024)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %h", i, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
