// tb_fp_addsub: self-checking testbench of the double-precision adder/subtractor.
//
// Issues one operation per cycle: directed cases (infinities, NaNs, exact cancellation,
// subnormal operands read as zero, overflow, deep cancellation, large exponent gaps) and
// random add/subtract pairs over a wide exponent range, compared bit for bit with the
// simulator's IEEE double arithmetic. Flags are checked on the directed cases, and every result
// must appear exactly 2 cycles after its operation was issued.
module tb_fp_addsub;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LATENCY = 2;
  localparam int NRAND   = 4000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0, in_sub = 1'b0;
  fp64_t     in_a = '0, in_b = '0;
  logic      out_valid;
  fp64_t     out_result;
  fp_flags_t out_flags;

  int checks = 0, failures = 0, cycle = 0;

  typedef struct {
    logic [63:0] a, b, val;
    logic        sub, chk_flags;
    fp_flags_t   flags;
    int          issued;
  } exp_t;
  exp_t expq[$];

  fp_addsub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(logic [63:0] a, logic [63:0] b, logic sub,
                       logic chk_flags = 1'b0, fp_flags_t flags = '0);
    exp_t e;
    @(negedge clk);
    in_valid = 1'b1; in_a = a; in_b = b; in_sub = sub;
    e.a = a; e.b = b; e.sub = sub;
    e.val = ref_op(sub ? 1 : 0, a, b);
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
            $display("FAIL %h %s %h: got %h flags %b lat %0d, expected %h flags %b",
                     e.a, e.sub ? "-" : "+", e.b, out_result, out_flags,
                     cycle - e.issued, e.val, e.flags);
        end
      end
    end
  end

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000, NINF = 64'hFFF0_0000_0000_0000;
  localparam logic [63:0] MAXN = 64'h7FEF_FFFF_FFFF_FFFF, ONE = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] SNAN = 64'h7FF0_0000_0000_0001;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed cases, flags {nv,dz,of,uf,nx}
    issue(PINF, PINF, 1'b1, 1'b1, 5'b10000);           // inf - inf: invalid
    issue(PINF, NINF, 1'b0, 1'b1, 5'b10000);           // inf + -inf: invalid
    issue(PINF, ONE,  1'b0, 1'b1, 5'b00000);           // inf + 1
    issue(SNAN, ONE,  1'b0, 1'b1, 5'b10000);           // signalling NaN
    issue(ONE,  ONE,  1'b1, 1'b1, 5'b00000);           // exact cancellation: +0
    issue(64'h0000_0000_0000_0001, ONE, 1'b0, 1'b1, 5'b00000);  // subnormal read as zero
    issue(MAXN, MAXN, 1'b0, 1'b1, 5'b00101);           // overflow
    issue(64'h3FF0_0000_0000_0001, ONE, 1'b1, 1'b1, 5'b00000);  // deep cancellation
    issue(ONE, 64'h3C90_0000_0000_0000, 1'b0, 1'b1, 5'b00001);  // tie, rounds to even
    issue(ONE, 64'h0010_0000_0000_0000, 1'b0, 1'b1, 5'b00001);  // huge exponent gap
    issue(64'h0020_0000_0000_0000, 64'h001F_FFFF_FFFF_FFFF, 1'b1, 1'b1, 5'b00011); // underflow
    issue(ONE, 64'h4000_0000_0000_0000, 1'b1, 1'b1, 5'b00000);  // 1 - 2 = -1
    // random, wide and narrow exponent spread
    for (int i = 0; i < NRAND; i++) begin
      logic [63:0] a, b;
      a = rand_fp(300);
      b = (i % 2) ? rand_fp(300) : {1'($urandom), a[62:52] - 11'($urandom_range(2, 0)),
                                     20'($urandom), $urandom};
      issue(a, b, 1'($urandom));
    end
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
