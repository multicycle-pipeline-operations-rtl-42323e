// tb_fp_multiplier: starts a multiply every cycle (random normal operands,
// zeros, infinities, NaN, overflow) and checks that each product appears
// exactly six cycles later and equals the double-precision reference
// rounded to binary32.
module tb_fp_multiplier;
  import tb_util_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  fp_multiplier dut (.*);

  int checks = 0, failures = 0;
  localparam int LAT = 6;
  localparam int N = 3000;
  logic [31:0] exp_q [N + LAT];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks++;
        if (y !== exp_q[n - LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d: got %h expected %h", n - LAT, y, exp_q[n - LAT]);
        end
      end
      if (n < N) begin
        a = rnd_f(20); b = rnd_f(20);
        if (n % 50 == 7) b = 32'h8000_0000;
        exp_q[n] = ref_mul(a, b);
        if (n == 100) begin a = 32'h7f80_0000; b = 32'h0;       exp_q[n] = 32'h7fc0_0000; end
        if (n == 101) begin a = 32'hff80_0000; b = 32'h3f80_0000; exp_q[n] = 32'hff80_0000; end
        if (n == 102) begin a = 32'h7fc0_0001; b = 32'h3f80_0000; exp_q[n] = 32'h7fc0_0000; end
        if (n == 103) begin a = 32'h7f00_0000; b = 32'h7f00_0000; exp_q[n] = 32'h7f80_0000; end
        if (n == 104) begin a = 32'h3f80_0001; b = 32'h3f7f_ffff; exp_q[n] = ref_mul(a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
