// div_core_c2: pipelined significand divider, Case 2 (two-term correction).
//
// With the same A = (Rh - Rl)/Rh^2 as Case 1 (A*R = 1 - e, e = (Rl/Rh)^2), it forms
//     P/R ~ ((2 - A*R)^2 - (1 - A*R)) * A*P = (1 + e + e^2)(1 - e) P/R = (1 - e^3) P/R,
// so the relative error is e^3 < 2^-(6*LUT_BITS) and a smaller table reaches double
// precision at the cost of one more multiplier stage.
// The datapath is the one the source design gives for this case: stage 1 is M1 = P(Rh-Rl),
// M2 = R(Rh-Rl) and the look-up of 1/Rh^2 in parallel; stage 2 is M3 = A*P and M4 = A*R; in stage 3 the bit inversion gives
// 2 - A*R and M5 squares it; in stage 4 the add logic subtracts 1 - A*R (the fraction bits of
// 2 - A*R) from M5's square and M6 multiplies the difference by A*P. Latency: four multiplier
// stages. A*P and 1 - A*R are carried across stage 3 in registers.
// Values are unsigned fixed point with 2 integer bits and F = 58 fraction bits (the source
// design marks its add logic as 58 bits wide); products are truncated.
//
// Interface: as div_core_c1, with LATENCY = 4 cycles.
module div_core_c2 #(
  parameter int unsigned LUT_BITS = 10,
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

  localparam int unsigned LATENCY = 4;
  localparam int unsigned W = F + 2;

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

  // stage 1
  logic [W-1:0] m1_p_d, m2_r_d, lut_a0;

  fix_mul #(.F(F)) u_m1 (.clk(clk), .a(p_x), .b(d_x), .p(m1_p_d));
  fix_mul #(.F(F)) u_m2 (.clk(clk), .a(r_x), .b(d_x), .p(m2_r_d));
  recip_lut #(.LUT_BITS(LUT_BITS), .F(F)) u_lut (
    .clk(clk), .idx(r_sig[51 -: LUT_BITS]), .q(lut_a0)
  );

  // stage 2
  logic [W-1:0] ap, ar;

  fix_mul #(.F(F)) u_m3 (.clk(clk), .a(m1_p_d), .b(lut_a0), .p(ap));
  fix_mul #(.F(F)) u_m4 (.clk(clk), .a(m2_r_d), .b(lut_a0), .p(ar));

  // stage 3: bit inversion, M5 = (2 - A*R)^2
  logic [W-1:0] two_m_ar, sq, ap_d, one_m_ar_d;

  always_comb begin
    if (ar[F]) two_m_ar = {2'b01, {F{1'b0}}};
    else       two_m_ar = {2'b01, ~ar[F-1:0]};
  end

  fix_mul #(.F(F)) u_m5 (.clk(clk), .a(two_m_ar), .b(two_m_ar), .p(sq));

  always_ff @(posedge clk) begin
    ap_d       <= ap;
    one_m_ar_d <= {2'b00, two_m_ar[F-1:0]};
  end

  // stage 4: add logic and M6
  logic [W-1:0] corr;

  always_comb corr = sq - one_m_ar_d;

  fix_mul #(.F(F)) u_m6 (.clk(clk), .a(corr), .b(ap_d), .p(q));

  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
