// fp_div: double-precision (binary64) floating-point divider built around the pipelined
// reciprocal-approximation significand divider.
//
// The quotient of the significands comes from div_core_c1 (DIV_CASE = 1, one correction
// step) or div_core_c2 (DIV_CASE = 2, two-term correction). Around it this unit handles
// what the source design leaves out: sign XOR, the exponent difference, special operands (NaN,
// infinity, zero, division by zero), normalisation of the approximate quotient in (0.5, 2),
// and rounding to nearest-even. Because the error of the approximate quotient is well below a
// quarter unit in the last place, the result is always one of the
// two binary64 neighbours of the exact quotient (faithful rounding) and equals the
// correctly rounded value in most cases; no remainder-based correction step is added, as
// the source design's datapaths have none. For the same reason the inexact flag reflects the
// approximate quotient and is also raised for some exact quotients.
// Subnormals are flushed to zero, as in the rest of the ALU.
//
// Interface: in_valid/in_a (dividend P)/in_b (divisor R) are sampled on a rising edge; the
// result follows LATENCY = core latency + 1 cycles later (4 for Case 1, 5 for Case 2). One
// operation per cycle. rst_n clears the valid pipeline only.
module fp_div
  import fpu_pkg::*;
#(
  parameter int unsigned DIV_CASE = 1,
  parameter int unsigned LUT_BITS = (DIV_CASE == 1) ? 14 : 10,
  parameter int unsigned F        = 58
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fp64_t     in_a,
  input  fp64_t     in_b,
  output logic      out_valid,
  output fp64_t     out_result,
  output fp_flags_t out_flags
);

  localparam int unsigned CORE_LAT = (DIV_CASE == 1) ? 3 : 4;

  typedef struct packed {
    logic               special;
    fp_res_t            spec;
    logic               sign;
    logic signed [13:0] exp;
  } side_t;

  side_t side_in, side_out;

  always_comb begin
    side_in.sign    = in_a.sign ^ in_b.sign;
    side_in.exp     = $signed({3'b000, in_a.exp}) - $signed({3'b000, in_b.exp}) + 14'(BIAS);
    side_in.special = 1'b1;
    if (is_nan(in_a) || is_nan(in_b))
      side_in.spec = special(QNAN, is_snan(in_a) || is_snan(in_b), 1'b0);
    else if ((is_inf(in_a) && is_inf(in_b)) || (is_zero(in_a) && is_zero(in_b)))
      side_in.spec = special(QNAN, 1'b1, 1'b0);
    else if (is_inf(in_a))
      side_in.spec = special(make_inf(side_in.sign), 1'b0, 1'b0);
    else if (is_zero(in_b))
      side_in.spec = special(make_inf(side_in.sign), 1'b0, 1'b1);
    else if (is_zero(in_a) || is_inf(in_b))
      side_in.spec = special(make_zero(side_in.sign), 1'b0, 1'b0);
    else begin
      side_in.special = 1'b0;
      side_in.spec    = special(QNAN, 1'b0, 1'b0);
    end
  end

  pipe_delay #(.WIDTH($bits(side_t)), .DEPTH(CORE_LAT)) u_side (
    .clk(clk), .d(side_in), .q(side_out)
  );

  logic [52:0]  p_sig, r_sig;
  logic [F+1:0] q;
  logic         core_valid;

  assign p_sig = {1'b1, in_a.frac};
  assign r_sig = {1'b1, in_b.frac};

  if (DIV_CASE == 1) begin : g_case1
    div_core_c1 #(.LUT_BITS(LUT_BITS), .F(F)) u_core (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .p_sig(p_sig), .r_sig(r_sig), .out_valid(core_valid), .q(q)
    );
  end else begin : g_case2
    div_core_c2 #(.LUT_BITS(LUT_BITS), .F(F)) u_core (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .p_sig(p_sig), .r_sig(r_sig), .out_valid(core_valid), .q(q)
    );
  end

  // normalise q in (0.5, 2) and round
  fp_res_t res;

  always_comb begin
    if (side_out.special)
      res = side_out.spec;
    else if (q[F])
      res = round_pack(side_out.sign, side_out.exp, q[F -: SIG_W],
                       q[F-SIG_W], |q[F-SIG_W-1:0]);
    else
      res = round_pack(side_out.sign, side_out.exp - 14'sd1, q[F-1 -: SIG_W],
                       q[F-1-SIG_W], |q[F-SIG_W-2:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= core_valid;
  end

  always_ff @(posedge clk) begin
    out_result <= res.value;
    out_flags  <= res.flags;
  end

endmodule
