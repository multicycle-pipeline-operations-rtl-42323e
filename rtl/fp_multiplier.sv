// fp_multiplier: fully pipelined single-precision floating-point multiplier
// with the six stages M1..M6.
//
// Operands presented on a/b in the cycle the instruction occupies M1 give the
// product on y six clock edges later; a new multiply may start every cycle
// (initiation interval 1, operation latency 6). There is no stall input.
//
// Stage split (this design's choice; only the stage count, latency and
// initiation interval are fixed):
//   M1  unpack, sign, biased exponent sum, special cases
//   M2  two 24x12-bit partial products
//   M3  add the partial products into the 48-bit significand product
//   M4  normalise (one-bit shift) and collect the sticky bit
//   M5  round to nearest even
//   M6  range check and pack
// Same binary32 simplifications as fp_adder: subnormals read and flushed as
// zero, NaN inputs give 0x7fc00000, inf * 0 gives 0x7fc00000, overflow gives
// infinity.
module fp_multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  typedef struct packed {
    logic        s;
    logic        zero;
    logic        special;
    logic [31:0] special_val;
  } flags_t;

  // ---------------- M1 ----------------
  logic [7:0] a_e, b_e;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    a_e    = a[30:23];
    b_e    = b[30:23];
    a_zero = (a_e == 8'd0);
    b_zero = (b_e == 8'd0);
    a_inf  = (a_e == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (b_e == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (a_e == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (b_e == 8'hff) && (b[22:0] != 23'd0);
  end

  flags_t      f1, f2, f3, f4, f5;
  logic [9:0]  e1, e2, e3, e4, e5;
  logic [23:0] ma1, mb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1 <= '0; e1 <= '0; ma1 <= '0; mb1 <= '0;
    end else begin
      f1.s    <= a[31] ^ b[31];
      f1.zero <= a_zero | b_zero;
      f1.special <= a_nan | b_nan | a_inf | b_inf;
      if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
        f1.special_val <= QNAN;
      else
        f1.special_val <= {a[31] ^ b[31], 8'hff, 23'd0};
      e1  <= {2'b00, a_e} + {2'b00, b_e} - 10'd127;
      ma1 <= {1'b1, a[22:0]};
      mb1 <= {1'b1, b[22:0]};
    end
  end

  // ---------------- M2 ----------------
  logic [35:0] pp_lo, pp_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f2 <= '0; e2 <= '0; pp_lo <= '0; pp_hi <= '0;
    end else begin
      f2    <= f1;
      e2    <= e1;
      pp_lo <= ma1 * mb1[11:0];
      pp_hi <= ma1 * mb1[23:12];
    end
  end

  // ---------------- M3 ----------------
  logic [47:0] prod3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f3 <= '0; e3 <= '0; prod3 <= '0;
    end else begin
      f3    <= f2;
      e3    <= e2;
      prod3 <= {12'd0, pp_lo} + {pp_hi, 12'd0};
    end
  end

  // ---------------- M4 ----------------
  // prod3 is in [2^46, 2^48): keep 24 significand bits, guard and sticky.
  logic [25:0] m4;   // significand[25:2], guard[1], sticky[0]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f4 <= '0; e4 <= '0; m4 <= '0;
    end else begin
      f4 <= f3;
      if (prod3[47]) begin
        m4 <= {prod3[47:23], |prod3[22:0]};
        e4 <= e3 + 10'd1;
      end else begin
        m4 <= {prod3[46:22], |prod3[21:0]};
        e4 <= e3;
      end
    end
  end

  // ---------------- M5 ----------------
  logic        rnd_up;
  logic [24:0] m_rnd;
  logic [24:0] m5;

  always_comb begin
    rnd_up = m4[1] & (m4[0] | m4[2]);
    m_rnd  = {1'b0, m4[25:2]} + 25'(rnd_up);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f5 <= '0; e5 <= '0; m5 <= '0;
    end else begin
      f5 <= f4;
      m5 <= m_rnd;
      e5 <= m_rnd[24] ? e4 + 10'd1 : e4;
    end
  end

  // ---------------- M6 ----------------
  logic [31:0] y6;

  always_comb begin
    if (f5.special)                    y6 = f5.special_val;
    else if (f5.zero)                  y6 = {f5.s, 31'd0};
    else if ($signed(e5) >= 10'sd255)  y6 = {f5.s, 8'hff, 23'd0};
    else if ($signed(e5) <= 10'sd0)    y6 = {f5.s, 31'd0};
    else if (m5[24])                   y6 = {f5.s, e5[7:0], m5[23:1]};
    else                               y6 = {f5.s, e5[7:0], m5[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y6;
  end

endmodule
