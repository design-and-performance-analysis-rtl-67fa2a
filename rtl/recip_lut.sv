// recip_lut: the look-up table of the reciprocal-approximation divider (the "LUT" box of both
// divider datapaths). It returns A0 = 1/Rh^2, where Rh = 1 + idx * 2^-LUT_BITS is the divisor
// significand truncated to its LUT_BITS leading fraction bits.
//
// Entry idx holds floor(2^(F + 2*LUT_BITS) / (2^LUT_BITS + idx)^2), i.e. 1/Rh^2 rounded down
// to F fraction bits, as an unsigned fixed-point number with 2 integer bits (W = F + 2 bits in
// all). Rounding down keeps the product A*R at or below one, which the bit-inversion step of
// the datapath relies on. The table is computed when the ROM is initialised rather than stored
// in a data file. The look-up is registered: idx is sampled on a rising edge and the entry
// is on q one cycle later, in the same pipeline stage as the multipliers M1 and M2.
// The source design gives the table's content (1/Rh^2) but not its size: LUT_BITS = 14 follows from
// this design's error bound for the Case 1 divider (relative error below 2^-(4*LUT_BITS)).
module recip_lut #(
  parameter int unsigned LUT_BITS = 14,
  parameter int unsigned F        = 58
) (
  input  logic                clk,
  input  logic [LUT_BITS-1:0] idx,
  output logic [F+1:0]        q
);

  localparam int unsigned DEPTH = 1 << LUT_BITS;

  function automatic logic [F+1:0] entry(int unsigned i);
    logic [127:0] num, den;
    num = 128'd1 << (F + 2 * LUT_BITS);
    den = (128'(DEPTH) + 128'(i)) * (128'(DEPTH) + 128'(i));
    return (F + 2)'(num / den);
  endfunction

  logic [F+1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = entry(i);
  end

  always_ff @(posedge clk)
    q <= rom[idx];

endmodule
