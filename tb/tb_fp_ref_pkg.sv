// tb_fp_ref_pkg: reference arithmetic for the FPU testbenches.
//
// The expected results come from the simulator's own IEEE-754 double arithmetic (real),
// which rounds to nearest-even, adjusted to the flush-to-zero policy of the RTL: subnormal
// operands are replaced by signed zeros before the operation and subnormal results are
// replaced by signed zeros afterwards. Also provides random operand generators and a
// distance-in-ulps helper for the divider, whose results are faithful rather than always
// correctly rounded.
package tb_fp_ref_pkg;

  function automatic logic [63:0] daz(logic [63:0] x);
    return (x[62:52] == 11'd0) ? {x[63], 63'd0} : x;
  endfunction

  function automatic logic is_nan64(logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 52'd0);
  endfunction

  function automatic logic [63:0] ftz(logic [63:0] x);
    return (x[62:52] == 11'd0) ? {x[63], 63'd0} : x;
  endfunction

  // op: 0 add, 1 sub, 2 mul, 3 div
  function automatic logic [63:0] ref_op(int op, logic [63:0] a, logic [63:0] b);
    real ra, rb, rr;
    ra = $bitstoreal(daz(a));
    rb = $bitstoreal(daz(b));
    case (op)
      0: rr = ra + rb;
      1: rr = ra - rb;
      2: rr = ra * rb;
      default: rr = ra / rb;
    endcase
    return ftz($realtobits(rr));
  endfunction

  // random normal number with biased exponent in [1023-span, 1023+span]
  function automatic logic [63:0] rand_fp(int span);
    logic [10:0] e;
    logic [51:0] f;
    e = 11'(1023 - span + int'($urandom_range(2 * span, 0)));
    f = {20'($urandom), $urandom};
    return {1'($urandom), e, f};
  endfunction

  // distance between two finite values of equal sign in units in the last place
  function automatic longint ulp_dist(logic [63:0] x, logic [63:0] y);
    longint d;
    d = longint'({1'b0, x[62:0]}) - longint'({1'b0, y[62:0]});
    return (d < 0) ? -d : d;
  endfunction

  // IEEE-style comparison used by the checks: NaNs match any NaN, otherwise bit equality
  function automatic logic same_fp(logic [63:0] got, logic [63:0] exp);
    if (is_nan64(exp)) return is_nan64(got);
    return got == exp;
  endfunction

endpackage
