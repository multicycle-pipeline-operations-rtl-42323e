// tb_util_pkg: testbench helpers.
//  - A reference for binary32 arithmetic computed independently of the RTL:
//    operands are converted to double, the operation is done in double
//    precision (exact or correctly rounded with 53 bits), and the result is
//    rounded to binary32 with round-to-nearest-even by bit manipulation of
//    the double. Double rounding is harmless here because 53 >= 2*24 + 2.
//    Results below the normal range flush to zero, like the RTL.
//  - A small assembler for the instruction subset of the pipeline.
package tb_util_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [52:0] m;
    logic [24:0] q;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    q  = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || q[0])) q = q + 25'd1;
    if (q[24]) begin q = q >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), q[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] ref_sub(input logic [31:0] a, b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] ref_mul(input logic [31:0] a, b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] ref_div(input logic [31:0] a, b);
    return r2f(f2r(a) / f2r(b));
  endfunction

  // A random normal binary32 number with exponent in [127-span, 127+span].
  function automatic logic [31:0] rnd_f(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(2 * span, 0)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // ---------------- assembler ----------------
  function automatic logic [31:0] a_r(input logic [5:0] fn, input int rd, rs, rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] a_i(input logic [5:0] op, input int rt, rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] a_add (input int rd, rs, rt); return a_r(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] a_sub (input int rd, rs, rt); return a_r(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] a_addi(input int rt, rs, imm); return a_i(6'h08, rt, rs, imm); endfunction
  function automatic logic [31:0] a_ori (input int rt, rs, imm); return a_i(6'h0d, rt, rs, imm); endfunction
  function automatic logic [31:0] a_lui (input int rt, imm);     return a_i(6'h0f, rt, 0, imm); endfunction
  function automatic logic [31:0] a_lw  (input int rt, off, rs); return a_i(6'h23, rt, rs, off); endfunction
  function automatic logic [31:0] a_sw  (input int rt, off, rs); return a_i(6'h2b, rt, rs, off); endfunction
  function automatic logic [31:0] a_lwc1(input int ft, off, rs); return a_i(6'h31, ft, rs, off); endfunction
  function automatic logic [31:0] a_beq (input int rs, rt, off); return a_i(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] a_bne (input int rs, rt, off); return a_i(6'h05, rt, rs, off); endfunction
  function automatic logic [31:0] a_j   (input int target);      return {6'h02, 26'(target)}; endfunction
  function automatic logic [31:0] a_nop ();                      return 32'h0; endfunction
  function automatic logic [31:0] a_fp(input logic [5:0] fn, input int fd, fs, ft);
    return {6'h11, 5'h10, 5'(ft), 5'(fs), 5'(fd), fn};
  endfunction
  function automatic logic [31:0] a_adds(input int fd, fs, ft); return a_fp(6'h00, fd, fs, ft); endfunction
  function automatic logic [31:0] a_subs(input int fd, fs, ft); return a_fp(6'h01, fd, fs, ft); endfunction
  function automatic logic [31:0] a_muls(input int fd, fs, ft); return a_fp(6'h02, fd, fs, ft); endfunction
  function automatic logic [31:0] a_divs(input int fd, fs, ft); return a_fp(6'h03, fd, fs, ft); endfunction

endpackage
