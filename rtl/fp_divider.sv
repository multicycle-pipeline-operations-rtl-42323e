// fp_divider: unpipelined single-precision floating-point divider,
// operation latency 25 cycles and initiation interval 25.
//
// start is asserted, with a, b and the destination tag, in the first of the
// 25 divide cycles. From the last divide cycle on, wf_req asks the writeback
// controller for the WF slot of the following cycle; wf_ack grants it. In the
// cycle after the grant (the WF cycle) y holds a / b. Without a grant the
// unit keeps asking and keeps its result, which is how a finished divide
// waits for a free WF slot; y keeps its value until the next division
// finishes. With an immediate grant the timing is IF ID DIVx25 WF.
//
// ready_next_cycle tells ID that a division issued now may start next cycle:
// the unit is idle and not starting, or its result is being granted WF
// this cycle. ID stalls
// a divide while it is 0. start while the unit is busy is a protocol error.
//
// Inside: restoring radix-2 division, one quotient bit per cycle. The first
// edge unpacks and pre-normalises the dividend so that the quotient lies in
// [1,2), and produces its leading 1. Edges 2..24 produce the other 23
// significand bits. The 25th edge computes the guard bit and the sticky bit
// from the remainder, rounds to nearest even and packs. The quotient loop is
// this design's choice; only the latency, the initiation interval and the
// ready-next-cycle signal are given. Same binary32 simplifications as
// fp_adder: subnormals read and flushed as zero, x/0 gives infinity, 0/0 and
// inf/inf give the quiet NaN 0x7fc00000.
module fp_divider #(
  parameter int unsigned TAGW = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [31:0]     a,
  input  logic [31:0]     b,
  input  logic [TAGW-1:0] tag_in,
  output logic            ready_next_cycle,
  output logic            busy,
  output logic            wf_req,
  input  logic            wf_ack,
  output logic [31:0]     y,
  output logic [TAGW-1:0] tag_out
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;
  // The latency is fixed by the algorithm: one edge per quotient bit for the
  // 24 significand bits, plus the rounding edge.
  localparam int unsigned LATENCY = 25;
  localparam int unsigned QBITS   = LATENCY - 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [4:0]  cnt;
  logic [24:0] rem;     // partial remainder, always < 2 * divisor
  logic [23:0] dvs;     // divisor significand
  logic [23:0] q;       // quotient bits so far
  logic [9:0]  e_q;
  logic        s_q;
  logic        special;
  logic [31:0] special_val;

  // ---- unpack (first cycle) ----
  logic [7:0]  a_e, b_e;
  logic [23:0] a_m, b_m;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        pre_shift;
  logic [24:0] rem0;

  always_comb begin
    a_e    = a[30:23];
    b_e    = b[30:23];
    a_m    = {1'b1, a[22:0]};
    b_m    = {1'b1, b[22:0]};
    a_zero = (a_e == 8'd0);
    b_zero = (b_e == 8'd0);
    a_inf  = (a_e == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (b_e == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (a_e == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (b_e == 8'hff) && (b[22:0] != 23'd0);
    pre_shift = (a_m < b_m);
    // dividend normalised into [divisor, 2*divisor); leading quotient bit is 1
    rem0 = (pre_shift ? {a_m, 1'b0} : {1'b0, a_m}) - {1'b0, b_m};
  end

  // ---- one restoring step ----
  logic [25:0] trial;
  logic        qbit;
  logic [24:0] rem_next;

  always_comb begin
    trial    = {rem, 1'b0} - {2'b00, dvs};
    qbit     = ~trial[25];
    rem_next = qbit ? trial[24:0] : {rem[23:0], 1'b0};
  end

  // ---- final rounding (guard from one more step, sticky from remainder) ----
  logic        g, st, rnd_up;
  logic [24:0] m_rnd;
  logic [9:0]  e_fin;
  logic [31:0] y_fin;

  always_comb begin
    g      = qbit;
    st     = (rem_next != 25'd0);
    rnd_up = g & (st | q[0]);
    m_rnd  = {1'b0, q} + 25'(rnd_up);
    e_fin  = m_rnd[24] ? e_q + 10'd1 : e_q;
    if (special)                         y_fin = special_val;
    else if ($signed(e_fin) >= 10'sd255) y_fin = {s_q, 8'hff, 23'd0};
    else if ($signed(e_fin) <= 10'sd0)   y_fin = {s_q, 31'd0};
    else if (m_rnd[24])                  y_fin = {s_q, e_fin[7:0], m_rnd[23:1]};
    else                                 y_fin = {s_q, e_fin[7:0], m_rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt <= '0; rem <= '0; dvs <= '0; q <= '0; e_q <= '0; s_q <= 1'b0;
      special <= 1'b0; special_val <= '0;
      y <= '0; tag_out <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (state == S_DONE && wf_ack) state <= S_IDLE;
          if (start) begin
            state   <= S_RUN;
            cnt     <= 5'd1;
            tag_out <= tag_in;
            s_q     <= a[31] ^ b[31];
            dvs     <= b_m;
            rem     <= rem0;
            q       <= 24'd1;
            e_q     <= {2'b00, a_e} - {2'b00, b_e} + 10'd127 - 10'(pre_shift);
            special <= a_nan | b_nan | a_inf | b_inf | a_zero | b_zero;
            if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero))
              special_val <= QNAN;
            else if (a_inf || b_zero)
              special_val <= {a[31] ^ b[31], 8'hff, 23'd0};
            else
              special_val <= {a[31] ^ b[31], 31'd0};
          end
        end
        S_RUN: begin
          if (cnt == 5'(QBITS)) begin
            y     <= y_fin;
            state <= wf_ack ? S_IDLE : S_DONE;
          end else begin
            q   <= {q[22:0], qbit};
            rem <= rem_next;
            cnt <= cnt + 5'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy             = (state != S_IDLE);
  assign wf_req           = (state == S_DONE) || (state == S_RUN && cnt == 5'(QBITS));
  assign ready_next_cycle = (state == S_IDLE && !start) || (wf_req && wf_ack);

  // A divide may only start when the unit is free.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && state == S_RUN))
    else $error("fp_divider: start while busy");

endmodule
