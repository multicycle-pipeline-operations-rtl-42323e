// fp_adder: fully pipelined single-precision floating-point adder/subtractor
// with the four stages A1..A4.
//
// Operands presented on a/b (with sub = 1 for a - b) in the cycle the
// instruction occupies A1 produce the result on y four clock edges later,
// so a new operation may start every cycle (initiation interval 1, operation
// latency 4). The unit has no stall input: nothing downstream of ID stalls in
// this pipeline.
//
// Stage split (this design's choice; only the stage count, latency and
// initiation interval are fixed):
//   A1  unpack, effective operation, order operands by magnitude
//   A2  align the smaller significand (guard/round/sticky kept) and add
//   A3  normalise (leading-zero count, shift, exponent adjust)
//   A4  round to nearest even and pack
// IEEE-754 binary32 with these simplifications: subnormal inputs are read as
// zero and tiny results are flushed to zero; any NaN input gives the quiet
// NaN 0x7fc00000; overflow gives infinity; inf - inf gives the quiet NaN.
module fp_adder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  // ---------------- A1 ----------------
  logic        a_s, b_s, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  a_e, b_e;
  logic [23:0] a_m, b_m;
  logic        swap;

  always_comb begin
    a_s   = a[31];
    b_s   = b[31] ^ sub;
    a_e   = a[30:23];
    b_e   = b[30:23];
    a_m   = (a_e == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    b_m   = (b_e == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_inf = (a_e == 8'hff) && (a[22:0] == 23'd0);
    b_inf = (b_e == 8'hff) && (b[22:0] == 23'd0);
    a_nan = (a_e == 8'hff) && (a[22:0] != 23'd0);
    b_nan = (b_e == 8'hff) && (b[22:0] != 23'd0);
    swap  = {b_e, b_m} > {a_e, a_m};
  end

  typedef struct packed {
    logic        s_big;
    logic        s_small;
    logic [7:0]  e_big;
    logic [7:0]  e_diff;
    logic [23:0] m_big;
    logic [23:0] m_small;
    logic        special;
    logic [31:0] special_val;
  } a1_t;

  a1_t r1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r1 <= '0;
    else begin
      r1.s_big   <= swap ? b_s : a_s;
      r1.s_small <= swap ? a_s : b_s;
      r1.e_big   <= swap ? b_e : a_e;
      r1.e_diff  <= swap ? (b_e - a_e) : (a_e - b_e);
      r1.m_big   <= swap ? b_m : a_m;
      r1.m_small <= swap ? a_m : b_m;
      r1.special <= a_nan | b_nan | a_inf | b_inf;
      if (a_nan || b_nan || (a_inf && b_inf && (a_s != b_s)))
        r1.special_val <= QNAN;
      else if (a_inf)
        r1.special_val <= {a_s, 8'hff, 23'd0};
      else
        r1.special_val <= {b_s, 8'hff, 23'd0};
    end
  end

  // ---------------- A2 ----------------
  logic [26:0] big_x, small_x;   // 24-bit significand + guard, round, sticky
  logic [27:0] sum2;
  logic [49:0] shifted;

  always_comb begin
    big_x   = {r1.m_big, 3'b000};
    shifted = {r1.m_small, 26'd0} >> r1.e_diff;
    // shifted[49:24] holds the significand and guard/round bits, the rest is sticky
    small_x = {shifted[49:24], |shifted[23:0]};
    if (r1.s_big == r1.s_small) sum2 = {1'b0, big_x} + {1'b0, small_x};
    else                        sum2 = {1'b0, big_x} - {1'b0, small_x};
  end

  typedef struct packed {
    logic        s;
    logic        s_zero;      // sign of an exact-zero result
    logic [9:0]  e;
    logic [27:0] sum;
    logic        special;
    logic [31:0] special_val;
  } a2_t;

  a2_t r2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r2 <= '0;
    else begin
      r2.s           <= r1.s_big;
      r2.s_zero      <= r1.s_big & r1.s_small;
      r2.e           <= {2'b00, r1.e_big};
      r2.sum         <= sum2;
      r2.special     <= r1.special;
      r2.special_val <= r1.special_val;
    end
  end

  // ---------------- A3 ----------------
  logic [4:0]  lz;
  logic [26:0] norm3;
  logic [9:0]  e3;

  always_comb begin
    lz = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (r2.sum[i]) lz = 5'(26 - i);
    if (r2.sum[27]) begin
      norm3 = {r2.sum[27:2], r2.sum[1] | r2.sum[0]};
      e3    = r2.e + 10'd1;
    end else begin
      norm3 = r2.sum[26:0] << lz;
      e3    = r2.e - 10'(lz);
    end
  end

  typedef struct packed {
    logic        s;
    logic        zero;
    logic [9:0]  e;
    logic [26:0] m;
    logic        special;
    logic [31:0] special_val;
  } a3_t;

  a3_t r3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r3 <= '0;
    else begin
      r3.zero        <= (r2.sum == 28'd0);
      r3.s           <= (r2.sum == 28'd0) ? r2.s_zero : r2.s;
      r3.e           <= e3;
      r3.m           <= norm3;
      r3.special     <= r2.special;
      r3.special_val <= r2.special_val;
    end
  end

  // ---------------- A4 ----------------
  logic        rnd_up;
  logic [24:0] m_rnd;
  logic [9:0]  e4;
  logic [31:0] y4;

  always_comb begin
    rnd_up = r3.m[2] & (r3.m[1] | r3.m[0] | r3.m[3]);
    m_rnd  = {1'b0, r3.m[26:3]} + 25'(rnd_up);
    e4     = r3.e;
    if (m_rnd[24]) e4 = e4 + 10'd1;
    if (r3.special)                      y4 = r3.special_val;
    else if (r3.zero)                    y4 = {r3.s, 31'd0};
    else if ($signed(e4) >= 10'sd255)    y4 = {r3.s, 8'hff, 23'd0};
    else if ($signed(e4) <= 10'sd0)      y4 = {r3.s, 31'd0};
    else if (m_rnd[24])                  y4 = {r3.s, e4[7:0], m_rnd[23:1]};
    else                                 y4 = {r3.s, e4[7:0], m_rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y4;
  end

endmodule
