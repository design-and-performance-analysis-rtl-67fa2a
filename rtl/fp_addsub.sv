// fp_addsub: double-precision (binary64) floating-point adder and subtractor.
//
// One unit serves both the adder and the subtractor of the ALU: in_sub flips the sign of
// operand b before the addition. The operation is the textbook one: order the operands by
// magnitude, align the smaller significand with a right shift that keeps a sticky bit, add or
// subtract, normalise with a leading-zero count, and round to nearest-even.
// The source design states only that the ALU contains a double-precision adder and subtractor;
// the algorithm, the two-stage pipeline split and the flush-to-zero handling of subnormals are
// this design's own choices.
//
// Interface: in_valid/in_a/in_b/in_sub are sampled on a rising clock edge; the result appears
// on out_result/out_flags with out_valid exactly LATENCY = 2 cycles later. A new operation can
// be issued every cycle. rst_n clears only the valid pipeline.
module fp_addsub
  import fpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_sub,
  input  fp64_t     in_a,
  input  fp64_t     in_b,
  output logic      out_valid,
  output fp64_t     out_result,
  output fp_flags_t out_flags
);

  localparam int unsigned XW = SIG_W + 3;  // significand plus guard, round, sticky

  // ---------------- stage 1: specials, alignment, add/subtract ----------------
  fp64_t           a, b, op_big, op_sml;
  logic            b_sign, eff_sub, swap;
  logic [11:0]     diff;
  logic [XW-1:0]   big_x, small_x, small_sh;
  logic            sticky;
  logic [XW:0]     sum;
  logic            is_special;
  fp_res_t         spec_res;

  always_comb begin
    a      = in_a;
    b      = in_b;
    b_sign = in_b.sign ^ in_sub;
    b.sign = b_sign;
    // order by magnitude
    swap   = {b.exp, b.frac} > {a.exp, a.frac};
    op_big    = swap ? b : a;
    op_sml  = swap ? a : b;
    eff_sub = a.sign ^ b.sign;
    diff   = {1'b0, op_big.exp} - {1'b0, op_sml.exp};
    big_x   = {1'b1, op_big.frac, 3'b000};
    small_x = {1'b1, op_sml.frac, 3'b000};
    if (diff >= 12'(XW)) begin
      small_sh = '0;
      sticky   = 1'b1;
    end else begin
      small_sh = small_x >> diff;
      sticky   = (small_x & ~({XW{1'b1}} << diff)) != '0;
    end
    small_sh[0] = small_sh[0] | sticky;
    sum = eff_sub ? ({1'b0, big_x} - {1'b0, small_sh}) : ({1'b0, big_x} + {1'b0, small_sh});

    // special operands
    is_special = 1'b1;
    if (is_nan(a) || is_nan(b))
      spec_res = special(QNAN, is_snan(a) || is_snan(b), 1'b0);
    else if (is_inf(a) && is_inf(b))
      spec_res = eff_sub ? special(QNAN, 1'b1, 1'b0) : special(a, 1'b0, 1'b0);
    else if (is_inf(a))
      spec_res = special(a, 1'b0, 1'b0);
    else if (is_inf(b))
      spec_res = special(b, 1'b0, 1'b0);
    else if (is_zero(a) && is_zero(b))
      spec_res = special(make_zero(a.sign & b.sign), 1'b0, 1'b0);
    else if (is_zero(a))
      spec_res = special(b, 1'b0, 1'b0);
    else if (is_zero(b))
      spec_res = special(a, 1'b0, 1'b0);
    else begin
      is_special = 1'b0;
      spec_res   = special(QNAN, 1'b0, 1'b0);
    end
  end

  logic            s1_valid, s1_special, s1_sign;
  fp_res_t         s1_spec;
  logic [XW:0]     s1_sum;
  logic [EXP_W-1:0] s1_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_special <= is_special;
    s1_spec    <= spec_res;
    s1_sum     <= sum;
    s1_exp     <= op_big.exp;
    s1_sign    <= op_big.sign;
  end

  // ---------------- stage 2: normalise and round ----------------
  logic [6:0]        lz;
  logic [XW-1:0]     norm;
  logic signed [13:0] nexp;
  fp_res_t           res;

  always_comb begin
    lz = '0;
    for (int i = 0; i < XW; i++)
      if (s1_sum[i]) lz = 7'(XW - 1 - i);
    if (s1_sum[XW]) begin
      norm = s1_sum[XW:1];
      norm[0] = norm[0] | s1_sum[0];
      nexp = $signed({3'b000, s1_exp}) + 14'sd1;
    end else begin
      norm = s1_sum[XW-1:0] << lz;
      nexp = $signed({3'b000, s1_exp}) - $signed({7'b0, lz});
    end
    if (s1_special)
      res = s1_spec;
    else if (s1_sum == '0)
      res = special(make_zero(1'b0), 1'b0, 1'b0);  // exact cancellation gives +0
    else
      res = round_pack(s1_sign, nexp, norm[XW-1:3], norm[2], |norm[1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    out_result <= res.value;
    out_flags  <= res.flags;
  end

endmodule
