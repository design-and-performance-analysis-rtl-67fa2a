// fp_mul: double-precision (binary64) floating-point multiplier.
//
// The significands (with hidden ones) are multiplied into a 106-bit product in the first
// stage, together with the sign XOR and the exponent sum; the second stage normalises the
// product, whose value lies in [1,4), by at most one position and rounds to nearest-even.
// The source design names a double-precision multiplier as one of the four ALU operations and
// reports its FPGA cost but does not describe its insides; this straightforward array-product
// form, the two-stage split and flush-to-zero of subnormals are this design's own choices.
//
// Interface: in_valid/in_a/in_b are sampled on a rising clock edge; out_valid, out_result and
// out_flags follow LATENCY = 2 cycles later. One operation per cycle. rst_n clears the valid
// pipeline only.
module fp_mul
  import fpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fp64_t     in_a,
  input  fp64_t     in_b,
  output logic      out_valid,
  output fp64_t     out_result,
  output fp_flags_t out_flags
);

  // ---------------- stage 1: product, exponent, specials ----------------
  logic               sign;
  logic               is_special;
  fp_res_t            spec_res;

  always_comb begin
    sign       = in_a.sign ^ in_b.sign;
    is_special = 1'b1;
    if (is_nan(in_a) || is_nan(in_b))
      spec_res = special(QNAN, is_snan(in_a) || is_snan(in_b), 1'b0);
    else if ((is_inf(in_a) && is_zero(in_b)) || (is_zero(in_a) && is_inf(in_b)))
      spec_res = special(QNAN, 1'b1, 1'b0);
    else if (is_inf(in_a) || is_inf(in_b))
      spec_res = special(make_inf(sign), 1'b0, 1'b0);
    else if (is_zero(in_a) || is_zero(in_b))
      spec_res = special(make_zero(sign), 1'b0, 1'b0);
    else begin
      is_special = 1'b0;
      spec_res   = special(QNAN, 1'b0, 1'b0);
    end
  end

  logic                 s1_valid, s1_special, s1_sign;
  fp_res_t              s1_spec;
  logic [2*SIG_W-1:0]   s1_prod;
  logic signed [13:0]   s1_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_special <= is_special;
    s1_spec    <= spec_res;
    s1_sign    <= sign;
    s1_prod    <= {1'b1, in_a.frac} * {1'b1, in_b.frac};
    s1_exp     <= $signed({3'b000, in_a.exp}) + $signed({3'b000, in_b.exp}) - 14'(BIAS);
  end

  // ---------------- stage 2: normalise and round ----------------
  fp_res_t res;

  always_comb begin
    if (s1_special)
      res = s1_spec;
    else if (s1_prod[2*SIG_W-1])
      res = round_pack(s1_sign, s1_exp + 14'sd1, s1_prod[2*SIG_W-1 -: SIG_W],
                       s1_prod[SIG_W-1], |s1_prod[SIG_W-2:0]);
    else
      res = round_pack(s1_sign, s1_exp, s1_prod[2*SIG_W-2 -: SIG_W],
                       s1_prod[SIG_W-2], |s1_prod[SIG_W-3:0]);
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
