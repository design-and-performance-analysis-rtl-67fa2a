// fix_mul: one pipelined fixed-point multiplier of the divider datapath (the boxes M1 to M6).
//
// Both operands and the product are unsigned fixed-point numbers with 2 integer bits and F
// fraction bits (W = F + 2 bits). The full 2W-bit product is truncated to F fraction bits;
// every value in the divider stays below 4, so the dropped integer bits are always zero.
// The product is registered: operands sampled on a rising edge give p one cycle later.
// The source design fixes which quantities each multiplier forms; the width F = 58 is the width the
// source design marks on the add logic of its Case 2 datapath, and truncation is this
// design's choice.
module fix_mul #(
  parameter int unsigned F = 58
) (
  input  logic         clk,
  input  logic [F+1:0] a,
  input  logic [F+1:0] b,
  output logic [F+1:0] p
);

  logic [2*F+3:0] full;

  always_comb full = a * b;

  always_ff @(posedge clk)
    p <= full[2*F+1:F];

endmodule
