// div_core_c1: pipelined significand divider, Case 1 (one correction step).
//
// It approximates the quotient of two significands P, R in [1,2) as
//     P/R ~ (2 - A*R) * A*P,   A = (Rh - Rl) / Rh^2,
// where Rh is R truncated to LUT_BITS fraction bits and Rl = R - Rh. Because
// (Rh - Rl)(Rh + Rl) = Rh^2 - Rl^2, A*R = 1 - e with e = (Rl/Rh)^2 < 2^-(2*LUT_BITS), and the
// correction factor (2 - A*R) = 1 + e leaves a relative error of e^2 < 2^-(4*LUT_BITS).
// The datapath is the one the source design gives for this case: the look-up of 1/Rh^2
// runs in parallel with M1 = P(Rh-Rl) and M2 = R(Rh-Rl) (stage 1); M3 = A*P and M4 = A*R use
// the table value (stage 2); the "Bit" step forms 2 - A*R by inverting the fraction bits of
// A*R, and M5 multiplies it by A*P (stage 3). The latency is three multiplier stages, as
// the source design states. All values are unsigned fixed point with 2 integer bits and F
// fraction bits, and each product is truncated (this design's choice). The result lies below
// the true quotient by at most the algorithmic error plus a few units of 2^-F, and can exceed
// it by a unit or two of 2^-F (a truncated A*R makes 2 - A*R slightly large). The subtraction
// Rh - Rl is a small subtractor in front of stage 1; the source design does not place it.
//
// Interface: p_sig/r_sig are 53-bit significands with the hidden one at bit 52, sampled with
// in_valid on a rising edge; q (in (0.5, 2)) and out_valid follow LATENCY = 3 cycles later.
module div_core_c1 #(
  parameter int unsigned LUT_BITS = 14,
  parameter int unsigned F        = 58
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [52:0]  p_sig,
  input  logic [52:0]  r_sig,
  output logic         out_valid,
  output logic [F+1:0] q
);

  localparam int unsigned LATENCY = 3;
  localparam int unsigned W = F + 2;

  // operand split and Rh - Rl (exact: Rh >= 1 > Rl)
  logic [52:0] rl_mask, rh, rl, rh_m_rl;
  logic [W-1:0] p_x, r_x, d_x;

  always_comb begin
    rl_mask = {1'b0, {LUT_BITS{1'b0}}, {(52 - LUT_BITS){1'b1}}};
    rh      = r_sig & ~rl_mask;
    rl      = r_sig & rl_mask;
    rh_m_rl = rh - rl;
    p_x     = {1'b0, p_sig, {(F - 52){1'b0}}};
    r_x     = {1'b0, r_sig, {(F - 52){1'b0}}};
    d_x     = {1'b0, rh_m_rl, {(F - 52){1'b0}}};
  end

  // stage 1: M1, M2 and the table in parallel
  logic [W-1:0] m1_p_d, m2_r_d, lut_a0;

  fix_mul #(.F(F)) u_m1 (.clk(clk), .a(p_x), .b(d_x), .p(m1_p_d));
  fix_mul #(.F(F)) u_m2 (.clk(clk), .a(r_x), .b(d_x), .p(m2_r_d));
  recip_lut #(.LUT_BITS(LUT_BITS), .F(F)) u_lut (
    .clk(clk), .idx(r_sig[51 -: LUT_BITS]), .q(lut_a0)
  );

  // stage 2: M3 = A*P, M4 = A*R
  logic [W-1:0] ap, ar;

  fix_mul #(.F(F)) u_m3 (.clk(clk), .a(m1_p_d), .b(lut_a0), .p(ap));
  fix_mul #(.F(F)) u_m4 (.clk(clk), .a(m2_r_d), .b(lut_a0), .p(ar));

  // stage 3: bit inversion gives 2 - A*R, M5 = (2 - A*R) * A*P
  logic [W-1:0] two_m_ar;

  always_comb begin
    if (ar[F]) two_m_ar = {2'b01, {F{1'b0}}};       // A*R = 1 exactly (R = 1.0)
    else       two_m_ar = {2'b01, ~ar[F-1:0]};
  end

  fix_mul #(.F(F)) u_m5 (.clk(clk), .a(two_m_ar), .b(ap), .p(q));

  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
