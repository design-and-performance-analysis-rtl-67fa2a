// tb_fpu_top_case2: end-to-end testbench of the floating-point ALU with the Case 2 divider
// (DIV_CASE = 2: two-term correction, 10-bit table). Otherwise the same as tb_fpu_top.
//
// A stream of add, subtract, multiply and divide operations is issued, mostly back to back
// with occasional idle cycles, so that operations of the 2-cycle units and of the divider
// overlap in the pipeline. Each result is compared with the simulator's IEEE double arithmetic
// (bit for bit; the divider within one unit in the last place), must carry its opcode and must
// appear exactly LATENCY = 5 cycles after issue. The testbench counts how often each mechanism
// of the design occurred and fails if one never did: each of the four operations, a special
// operand (NaN or infinity), division by zero, overflow, underflow flushed to zero, exact
// cancellation, a divide issued in the cycle after another unit's operation, and an idle gap.
module tb_fpu_top_case2;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LATENCY = 5;
  localparam int NOPS    = 6000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  fpu_op_e   in_op = OP_ADD;
  fp64_t     in_a = '0, in_b = '0;
  logic      out_valid;
  fpu_op_e   out_op;
  fp64_t     out_result;
  fp_flags_t out_flags;

  int checks = 0, failures = 0, cycle = 0;

  typedef enum int {
    EV_ADD, EV_SUB, EV_MUL, EV_DIV, EV_SPECIAL, EV_DZ, EV_OF, EV_UF, EV_CANCEL, EV_MIXED,
    EV_IDLE, EV_N
  } ev_e;
  int ev[EV_N];
  string ev_name[EV_N] = '{"add", "sub", "mul", "div", "special operand", "divide by zero",
                           "overflow", "underflow to zero", "exact cancellation",
                           "divide after other op", "idle gap"};

  typedef struct {
    fpu_op_e     op;
    logic [63:0] a, b, val;
    int          issued;
  } exp_t;
  exp_t expq[$];

  fpu_top #(.DIV_CASE(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fpu_op_e last_op = OP_ADD;
  logic    last_valid = 1'b0;

  task automatic issue(fpu_op_e op, logic [63:0] a, logic [63:0] b);
    exp_t e;
    @(negedge clk);
    if (op == OP_DIV && last_valid && last_op != OP_DIV) ev[EV_MIXED]++;
    in_valid = 1'b1; in_op = op; in_a = a; in_b = b;
    last_valid = 1'b1; last_op = op;
    e.op = op; e.a = a; e.b = b; e.issued = cycle;
    e.val = ref_op(int'(op), a, b);
    expq.push_back(e);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    last_valid = 1'b0;
    ev[EV_IDLE]++;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      logic ok;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result %h", out_result);
      end else begin
        e = expq.pop_front();
        checks++;
        if (e.op == OP_DIV && !is_nan64(e.val) && e.val[62:52] != 11'h7FF && e.val[62:0] != 0)
          ok = (out_result[63] == e.val[63]) && ulp_dist(out_result, e.val) <= 1;
        else
          ok = same_fp(out_result, e.val);
        ok = ok && out_op == e.op && (cycle - e.issued) == LATENCY;
        case (e.op)
          OP_ADD: ev[EV_ADD]++;
          OP_SUB: ev[EV_SUB]++;
          OP_MUL: ev[EV_MUL]++;
          default: ev[EV_DIV]++;
        endcase
        if (out_flags.nv || is_nan64(e.a) || is_nan64(e.b) ||
            e.a[62:52] == 11'h7FF || e.b[62:52] == 11'h7FF) ev[EV_SPECIAL]++;
        if (out_flags.dz) ev[EV_DZ]++;
        if (out_flags.of) ev[EV_OF]++;
        if (out_flags.uf) ev[EV_UF]++;
        if ((e.op == OP_ADD || e.op == OP_SUB) && e.a[62:52] != 0 && out_result[62:0] == 0 &&
            !out_flags.uf) ev[EV_CANCEL]++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL op %s: %h, %h -> %s %h lat %0d, expected %h", e.op.name(), e.a,
                     e.b, out_op.name(), out_result, cycle - e.issued, e.val);
        end
      end
    end
  end

  function automatic logic [63:0] pick_operand();
    int unsigned k;
    k = $urandom_range(99, 0);
    if (k < 2)  return 64'h7FF0_0000_0000_0000;                 // infinity
    if (k < 3)  return 64'h7FF8_0000_0000_0000;                 // NaN
    if (k < 6)  return 64'h0000_0000_0000_0000;                 // zero
    if (k < 10) return rand_fp(1020);                           // extreme exponents
    return rand_fp(200);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: each flag case at least once, whatever the random stream does
    issue(OP_MUL, 64'h7FEF_FFFF_FFFF_FFFF, 64'h4000_0000_0000_0000);  // overflow
    issue(OP_DIV, 64'h0010_0000_0000_0000, 64'h4000_0000_0000_0000);  // underflow
    issue(OP_DIV, 64'h3FF0_0000_0000_0000, 64'h0000_0000_0000_0000);  // divide by zero
    issue(OP_SUB, 64'h4000_0000_0000_0001, 64'h4000_0000_0000_0001);  // cancellation
    issue(OP_ADD, 64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000);  // inf - inf
    idle();
    for (int i = 0; i < NOPS; i++) begin
      fpu_op_e op;
      logic [63:0] a, b;
      op = fpu_op_e'($urandom_range(3, 0));
      a = pick_operand();
      b = ($urandom_range(19, 0) == 0) ? a : pick_operand();    // x - x, x / x
      issue(op, a, b);
      if ($urandom_range(15, 0) == 0) idle();
    end
    idle();
    repeat (LATENCY + 3) @(negedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results missing", expq.size());
    end
    for (int k = 0; k < EV_N; k++) begin
      $display("%-24s %0d", ev_name[k], ev[k]);
      checks++;
      if (ev[k] == 0) begin
        failures++;
        $display("FAIL: %s never happened", ev_name[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
