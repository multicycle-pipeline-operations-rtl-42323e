// tb_fp_scoreboard: random issues and writebacks under the rule the pipeline
// obeys (a register never has more than two pending writes, and a write
// only completes when one is pending), checked every cycle against a
// reference count of pending writes per register: ready means none,
// single means exactly one.
module tb_fp_scoreboard;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        issue_we, wr_we;
  logic [4:0]  issue_fd, wr_fd;
  logic [31:0] ready, single;
  fp_scoreboard dut (.*);

  int checks = 0, failures = 0;
  int cnt [32];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [31:0] er, es;
    for (int i = 0; i < 32; i++) cnt[i] = 0;
    issue_we = 0; wr_we = 0; issue_fd = 0; wr_fd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) begin er[i] = (cnt[i] == 0); es[i] = (cnt[i] == 1); end
      checks++;
      if (ready !== er || single !== es) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: ready %h/%h single %h/%h", n, ready, er, single, es);
      end
      // a write to a register with a pending write
      wr_we = 0;
      r = int'($urandom_range(7, 0));
      if (cnt[r] > 0 && $urandom_range(1, 0) == 1) begin wr_we = 1; wr_fd = 5'(r); end
      issue_we = 0;
      r = int'($urandom_range(7, 0));
      if ($urandom_range(1, 0) == 1 && (cnt[r] - int'(wr_we && wr_fd == 5'(r))) < 2) begin
        issue_we = 1; issue_fd = 5'(r);
      end
      if (wr_we) cnt[wr_fd]--;
      if (issue_we) cnt[issue_fd]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
