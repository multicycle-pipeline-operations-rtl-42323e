// tb_fp_divider: runs divisions one after another. For each it checks that
// wf_req rises in the 25th divide cycle and not before, that ready_next_cycle
// is 0 while the unit is busy, that the result waits (wf_req held) for a
// randomly delayed grant, and that y in the cycle after the grant equals the
// double-precision reference rounded to binary32, with the right tag.
module tb_fp_divider;
  import tb_util_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        start, ready_next_cycle, busy, wf_req, wf_ack;
  logic [31:0] a, b, y;
  logic [4:0]  tag_in, tag_out;
  fp_divider dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    int wait_cyc, lat;
    start = 1'b0; wf_ack = 1'b0; a = '0; b = '0; tag_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check("ready when idle", 32'(ready_next_cycle), 32'd1);
      a = rnd_f(20); b = rnd_f(20);
      e = ref_div(a, b);
      if (n == 3) begin b = 32'h0;         e = {a[31], 8'hff, 23'd0}; end
      if (n == 4) begin a = 32'h0; b = 32'h0; e = 32'h7fc0_0000; end
      if (n == 5) begin a = 32'h0;         e = {b[31], 31'd0}; end
      if (n == 6) begin a = 32'h7f00_0000; b = 32'h0080_0001; e = 32'h7f80_0000; end
      tag_in = 5'(n);
      start = 1'b1;
      lat = 2;   // number of the divide cycle after the next edge
      @(negedge clk);
      start = 1'b0;
      // wait for the request; the last divide cycle is cycle 25
      while (!wf_req && lat < 40) begin
        check("not ready while busy", 32'(ready_next_cycle), 32'd0);
        lat++;
        @(negedge clk);
      end
      check("cycles until WF request", 32'(lat), 32'd25);
      wait_cyc = (n % 3 == 0) ? 0 : int'($urandom_range(5, 0));
      repeat (wait_cyc) begin
        @(negedge clk);
        check("request held", 32'(wf_req), 32'd1);
      end
      wf_ack = 1'b1;
      #1 check("ready on grant", 32'(ready_next_cycle), 32'd1);
      @(negedge clk);
      wf_ack = 1'b0;
      check($sformatf("quotient %0d", n), y, e);
      check("tag", 32'(tag_out), 32'(n % 32));
      check("request dropped", 32'(wf_req), 32'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
