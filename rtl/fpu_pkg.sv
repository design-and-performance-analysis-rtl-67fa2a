// fpu_pkg: types, constants and shared rounding logic of the double-precision FPU.
//
// Operands and results are IEEE-754 binary64 words (fp64_t). The ALU offers the four
// operations add, subtract, multiply and divide (fpu_op_e). All units round to nearest,
// ties to even. Subnormal operands are read as zero and results that would be subnormal
// are flushed to a signed zero (with the underflow and inexact flags), tininess being judged
// on the exponent after rounding; this flush-to-zero
// policy, the flag set and the NaN handling are choices of this design, not taken from the
// description it follows, which gives no number-format details beyond "double precision".
package fpu_pkg;

  localparam int unsigned EXP_W   = 11;
  localparam int unsigned FRAC_W  = 52;
  localparam int unsigned SIG_W   = FRAC_W + 1;        // significand with hidden one
  localparam int signed   BIAS    = 1023;
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;  // all-ones exponent: inf / NaN

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } fpu_op_e;

  // IEEE exception flags
  typedef struct packed {
    logic nv;  // invalid operation
    logic dz;  // division by zero
    logic of;  // overflow
    logic uf;  // underflow (result flushed to zero)
    logic nx;  // inexact
  } fp_flags_t;

  typedef struct packed {
    fp64_t     value;
    fp_flags_t flags;
  } fp_res_t;

  localparam fp64_t QNAN = '{sign: 1'b0, exp: '1, frac: {1'b1, {(FRAC_W-1){1'b0}}}};

  function automatic logic is_nan(fp64_t x);
    return (x.exp == EXP_W'(EXP_MAX)) && (x.frac != '0);
  endfunction

  function automatic logic is_snan(fp64_t x);
    return is_nan(x) && !x.frac[FRAC_W-1];
  endfunction

  function automatic logic is_inf(fp64_t x);
    return (x.exp == EXP_W'(EXP_MAX)) && (x.frac == '0);
  endfunction

  // zero or subnormal: both are read as zero
  function automatic logic is_zero(fp64_t x);
    return x.exp == '0;
  endfunction

  function automatic fp64_t make_inf(logic s);
    return '{sign: s, exp: '1, frac: '0};
  endfunction

  function automatic fp64_t make_zero(logic s);
    return '{sign: s, exp: '0, frac: '0};
  endfunction

  function automatic fp_res_t special(fp64_t v, logic nv, logic dz);
    fp_res_t r;
    r.value = v;
    r.flags = '{nv: nv, dz: dz, of: 1'b0, uf: 1'b0, nx: 1'b0};
    return r;
  endfunction

  // Round a normalised significand (sig[SIG_W-1] = 1) to nearest-even using the guard bit g
  // and sticky bit s, then pack it. exp is the biased exponent of sig, before rounding; it
  // may be out of range in either direction.
  function automatic fp_res_t round_pack(logic sign, logic signed [13:0] exp,
                                         logic [SIG_W-1:0] sig, logic g, logic s);
    fp_res_t          r;
    logic             inc;
    logic [SIG_W:0]   sum;
    logic signed [13:0] e;
    logic [SIG_W-1:0] m;
    inc = g && (s || sig[0]);
    sum = {1'b0, sig} + {{SIG_W{1'b0}}, inc};
    if (sum[SIG_W]) begin
      m = sum[SIG_W:1];
      e = exp + 14'sd1;
    end else begin
      m = sum[SIG_W-1:0];
      e = exp;
    end
    r.flags = '{nv: 1'b0, dz: 1'b0, of: 1'b0, uf: 1'b0, nx: g || s};
    if (e >= $signed(14'(EXP_MAX))) begin
      r.value    = make_inf(sign);
      r.flags.of = 1'b1;
      r.flags.nx = 1'b1;
    end else if (e <= 14'sd0) begin
      r.value    = make_zero(sign);
      r.flags.uf = 1'b1;
      r.flags.nx = 1'b1;
    end else begin
      r.value = '{sign: sign, exp: e[EXP_W-1:0], frac: m[FRAC_W-1:0]};
    end
    return r;
  endfunction

endpackage
