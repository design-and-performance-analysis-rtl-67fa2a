// tb_fp_mul: self-checking testbench of the double-precision multiplier.
//
// Issues one operation per cycle: directed cases (0 * inf, NaN, overflow, underflow to zero,
// exact products, a rounding tie) with their flags, then random pairs over a wide exponent
// range, compared bit for bit with the simulator's IEEE double multiplication. Every result
// must appear exactly 2 cycles after its operation was issued.
module tb_fp_mul;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LATENCY = 2;
  localparam int NRAND   = 4000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  fp64_t     in_a = '0, in_b = '0;
  logic      out_valid;
  fp64_t     out_result;
  fp_flags_t out_flags;

  int checks = 0, failures = 0, cycle = 0;

  typedef struct {
    logic [63:0] a, b, val;
    logic        chk_flags;
    fp_flags_t   flags;
    int          issued;
  } exp_t;
  exp_t expq[$];

  fp_mul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(logic [63:0] a, logic [63:0] b,
                       logic chk_flags = 1'b0, fp_flags_t flags = '0);
    exp_t e;
    @(negedge clk);
    in_valid = 1'b1; in_a = a; in_b = b;
    e.a = a; e.b = b;
    e.val = ref_op(2, a, b);
    e.chk_flags = chk_flags; e.flags = flags; e.issued = cycle;
    expq.push_back(e);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result %h", out_result);
      end else begin
        e = expq.pop_front();
        checks++;
        if (!same_fp(out_result, e.val) || (cycle - e.issued) != LATENCY ||
            (e.chk_flags && out_flags != e.flags)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %h * %h: got %h flags %b lat %0d, expected %h flags %b",
                     e.a, e.b, out_result, out_flags, cycle - e.issued, e.val, e.flags);
        end
      end
    end
  end

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000, ZERO = 64'h0;
  localparam logic [63:0] MAXN = 64'h7FEF_FFFF_FFFF_FFFF, ONE = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] QNAN64 = 64'h7FF8_0000_0000_0000;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    issue(PINF, ZERO, 1'b1, 5'b10000);                         // inf * 0: invalid
    issue(QNAN64, ONE, 1'b1, 5'b00000);                        // quiet NaN propagates
    issue(PINF, 64'hC000_0000_0000_0000, 1'b1, 5'b00000);      // inf * -2 = -inf
    issue(MAXN, 64'h4000_0000_0000_0000, 1'b1, 5'b00101);      // overflow
    issue(64'h0010_0000_0000_0000, 64'h3FE0_0000_0000_0000, 1'b1, 5'b00011); // underflow
    issue(64'h4008_0000_0000_0000, 64'h4014_0000_0000_0000, 1'b1, 5'b00000); // 3 * 5 exact
    issue(64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0001, 1'b1, 5'b00001); // inexact
    issue(64'h3FF8_0000_0000_0001, 64'h3FF8_0000_0000_0000, 1'b1, 5'b00001); // tie area
    issue(ZERO, 64'hBFF0_0000_0000_0000, 1'b1, 5'b00000);     // 0 * -1 = -0
    for (int i = 0; i < NRAND; i++)
      issue(rand_fp(500), rand_fp(500));
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
