// tb_fp_adder: feeds the adder a new operation every cycle (random normal
// operands with nearby and distant exponents, cancellations, zeros,
// infinities, NaN) and checks that each result appears exactly four cycles
// later and equals the double-precision reference rounded to binary32.
module tb_fp_adder;
  import tb_util_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  logic sub;
  fp_adder dut (.*);

  int checks = 0, failures = 0;
  localparam int LAT = 4;
  localparam int N = 3000;
  logic [31:0] exp_q [N + LAT];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; sub = 1'b0;
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
        unique case (n % 10)
          0, 1, 2, 3: begin a = rnd_f(4);  b = rnd_f(4);  end
          4:          begin a = rnd_f(30); b = rnd_f(30); end
          5:          begin a = rnd_f(4);  b = {~a[31], a[30:0]} ^ 32'(($urandom & 3)); end
          6:          begin a = rnd_f(4);  b = (n % 20 == 6) ? 32'h0 : 32'h8000_0000; end
          7:          begin a = rnd_f(4);  b = {a[31], a[30:0]} ^ 32'(($urandom & 'hff)); end
          default:    begin a = rnd_f(10); b = rnd_f(10); end
        endcase
        sub = 1'($urandom);
        if (n == 100) begin a = 32'h7f80_0000; b = rnd_f(3); end                 // inf + x
        if (n == 101) begin a = 32'h7f80_0000; b = 32'h7f80_0000; sub = 1'b1; end // inf - inf
        if (n == 102) begin a = 32'h7fc0_1234; b = rnd_f(3); end                 // NaN
        if (n == 103) begin a = 32'h0; b = 32'h0; sub = 1'b0; end               // +0 + +0
        if (n == 104) begin a = 32'h7f7f_ffff; b = 32'h7f7f_ffff; sub = 1'b0; end // overflow
        if (n == 101)      exp_q[n] = 32'h7fc0_0000;
        else if (n == 102) exp_q[n] = 32'h7fc0_0000;
        else if (n == 100) exp_q[n] = 32'h7f80_0000;
        else               exp_q[n] = sub ? ref_sub(a, b) : ref_add(a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
