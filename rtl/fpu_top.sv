// fpu_top: double-precision floating-point ALU with add, subtract, multiply and divide.
//
// One issue port accepts an operation per cycle (in_valid, in_op, in_a, in_b). The operation
// goes to its unit: fp_addsub for OP_ADD and OP_SUB, fp_mul for OP_MUL, fp_div for OP_DIV.
// The divider uses the pipelined reciprocal-approximation datapath of Case 1 (DIV_CASE = 1,
// the default) or Case 2 (DIV_CASE = 2). All units are fully pipelined with fixed latencies;
// the shorter ones are padded with registers so that every operation takes LATENCY cycles
// (the divider's: 4 for Case 1, 5 for Case 2). Results therefore leave in issue order and
// never collide, and out_valid/out_op/out_result/out_flags are driven LATENCY cycles after the
// operation was issued.
// The source design describes the ALU only as containing these four double-precision operations
// and the divider datapaths; the issue port, the padding to a common latency, the opcode
// encoding and the exception flags are this design's own.
module fpu_top
  import fpu_pkg::*;
#(
  parameter int unsigned DIV_CASE = 1,
  parameter int unsigned LUT_BITS = (DIV_CASE == 1) ? 14 : 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fpu_op_e   in_op,
  input  fp64_t     in_a,
  input  fp64_t     in_b,
  output logic      out_valid,
  output fpu_op_e   out_op,
  output fp64_t     out_result,
  output fp_flags_t out_flags
);

  localparam int unsigned LATENCY  = (DIV_CASE == 1) ? 4 : 5;
  localparam int unsigned ALU_LAT  = 2;   // fp_addsub and fp_mul
  localparam int unsigned PAD      = LATENCY - ALU_LAT;

  // ---------------- units ----------------
  logic      as_valid, mul_valid, div_valid;
  fp64_t     as_res, mul_res, div_res;
  fp_flags_t as_flg, mul_flg, div_flg;

  fp_addsub u_addsub (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && (in_op == OP_ADD || in_op == OP_SUB)),
    .in_sub(in_op == OP_SUB), .in_a(in_a), .in_b(in_b),
    .out_valid(as_valid), .out_result(as_res), .out_flags(as_flg)
  );

  fp_mul u_mul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && in_op == OP_MUL), .in_a(in_a), .in_b(in_b),
    .out_valid(mul_valid), .out_result(mul_res), .out_flags(mul_flg)
  );

  fp_div #(.DIV_CASE(DIV_CASE), .LUT_BITS(LUT_BITS)) u_div (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && in_op == OP_DIV), .in_a(in_a), .in_b(in_b),
    .out_valid(div_valid), .out_result(div_res), .out_flags(div_flg)
  );

  // ---------------- latency padding ----------------
  fp64_t     as_res_p, mul_res_p;
  fp_flags_t as_flg_p, mul_flg_p;

  pipe_delay #(.WIDTH($bits(fp64_t) + $bits(fp_flags_t)), .DEPTH(PAD)) u_pad_as (
    .clk(clk), .d({as_res, as_flg}), .q({as_res_p, as_flg_p})
  );

  pipe_delay #(.WIDTH($bits(fp64_t) + $bits(fp_flags_t)), .DEPTH(PAD)) u_pad_mul (
    .clk(clk), .d({mul_res, mul_flg}), .q({mul_res_p, mul_flg_p})
  );

  // issue tracking: which operation leaves the pipeline this cycle
  logic    vpipe  [LATENCY];
  fpu_op_e oppipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) vpipe[i] <= 1'b0;
    end else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < LATENCY; i++) vpipe[i] <= vpipe[i-1];
    end
  end

  always_ff @(posedge clk) begin
    oppipe[0] <= in_op;
    for (int i = 1; i < LATENCY; i++) oppipe[i] <= oppipe[i-1];
  end

  assign out_valid = vpipe[LATENCY-1];
  assign out_op    = oppipe[LATENCY-1];

  always_comb begin
    unique case (out_op)
      OP_ADD, OP_SUB: begin out_result = as_res_p;  out_flags = as_flg_p;  end
      OP_MUL:         begin out_result = mul_res_p; out_flags = mul_flg_p; end
      default:        begin out_result = div_res;   out_flags = div_flg;   end
    endcase
  end

  // Each unit's result arrives exactly when the tracked opcode says so.
  property p_aligned(logic v, int unsigned stage, logic op_ok);
    @(posedge clk) disable iff (!rst_n) v |-> (vpipe[stage] && op_ok);
  endproperty
  a_addsub_aligned: assert property (p_aligned(as_valid, ALU_LAT - 1,
                                    oppipe[ALU_LAT-1] == OP_ADD || oppipe[ALU_LAT-1] == OP_SUB));
  a_mul_aligned:    assert property (p_aligned(mul_valid, ALU_LAT - 1,
                                    oppipe[ALU_LAT-1] == OP_MUL));
  a_div_aligned:    assert property (p_aligned(div_valid, LATENCY - 1,
                                    oppipe[LATENCY-1] == OP_DIV));

endmodule
