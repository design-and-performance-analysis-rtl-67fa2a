// tb_fp_div: self-checking testbench of the double-precision divider, both datapaths.
//
// Two dividers, one per datapath (DIV_CASE = 1, the default, and DIV_CASE = 2), get the same
// operation every cycle. Each result is compared with the simulator's IEEE double division:
// special operands, exact quotients and the flag cases must match bit for bit; random
// quotients must be within one unit in the last place (the divider rounds faithfully) with
// the right sign, and the share that is correctly rounded is reported. Latencies must be 4
// and 5 cycles.
module tb_fp_div;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int NRAND = 4000;
  localparam int NMAX  = NRAND + 64;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      in_valid = 1'b0;
  fp64_t     in_a = '0, in_b = '0;
  logic      v1, v2;
  fp64_t     r1, r2;
  fp_flags_t f1, f2;

  int checks = 0, failures = 0, cycle = 0, n = 0;
  int exact_rounded[2] = '{0, 0};
  int rnd_count = 0;

  typedef struct {
    logic [63:0] a, b, val;
    logic        strict, chk_flags;
    fp_flags_t   flags;
    int          issued;
  } exp_t;
  exp_t ops [NMAX];
  int   rd[2] = '{0, 0};

  fp_div                  dut1 (.clk, .rst_n, .in_valid, .in_a, .in_b,
                                .out_valid(v1), .out_result(r1), .out_flags(f1));
  fp_div #(.DIV_CASE(2))  dut2 (.clk, .rst_n, .in_valid, .in_a, .in_b,
                                .out_valid(v2), .out_result(r2), .out_flags(f2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(logic [63:0] a, logic [63:0] b, logic strict,
                       logic chk_flags = 1'b0, fp_flags_t flags = '0);
    @(negedge clk);
    in_valid = 1'b1; in_a = a; in_b = b;
    ops[n].a = a; ops[n].b = b; ops[n].val = ref_op(3, a, b);
    ops[n].strict = strict; ops[n].chk_flags = chk_flags; ops[n].flags = flags;
    ops[n].issued = cycle;
    n++;
  endtask

  task automatic check(int k, logic [63:0] got, fp_flags_t flags, int lat);
    exp_t e;
    logic ok;
    if (rd[k] >= n) begin
      failures++;
      $display("case %0d: unexpected result", k + 1);
      return;
    end
    e = ops[rd[k]];
    rd[k]++;
    checks++;
    if (e.strict)
      ok = same_fp(got, e.val) && (!e.chk_flags || flags == e.flags);
    else begin
      ok = (got[63] == e.val[63]) && (ulp_dist(got, e.val) <= 1);
      if (got == e.val) exact_rounded[k]++;
    end
    if (!ok || (cycle - e.issued) != lat) begin
      failures++;
      if (failures < 10)
        $display("FAIL case %0d: %h / %h = %h flags %b lat %0d, expected %h flags %b",
                 k + 1, e.a, e.b, got, flags, cycle - e.issued, e.val, e.flags);
    end
  endtask

  always @(negedge clk) if (rst_n && v1) check(0, r1, f1, 4);
  always @(negedge clk) if (rst_n && v2) check(1, r2, f2, 5);

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000, ZERO = 64'h0;
  localparam logic [63:0] MAXN = 64'h7FEF_FFFF_FFFF_FFFF, ONE = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] MINN = 64'h0010_0000_0000_0000;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // specials and flags {nv,dz,of,uf,nx}
    issue(ZERO, ZERO, 1'b1, 1'b1, 5'b10000);                      // 0/0
    issue(PINF, PINF, 1'b1, 1'b1, 5'b10000);                      // inf/inf
    issue(ONE,  ZERO, 1'b1, 1'b1, 5'b01000);                      // 1/0
    issue(64'hBFF0_0000_0000_0000, ZERO, 1'b1, 1'b1, 5'b01000);   // -1/0 = -inf
    issue(ZERO, ONE,  1'b1, 1'b1, 5'b00000);                      // 0/1
    issue(ONE,  PINF, 1'b1, 1'b1, 5'b00000);                      // 1/inf
    issue(64'h7FF8_0000_0000_0000, ONE, 1'b1, 1'b1, 5'b00000);    // NaN
    issue(MAXN, 64'h3FE0_0000_0000_0000, 1'b1, 1'b1, 5'b00101);   // overflow
    issue(MINN, 64'h4000_0000_0000_0000, 1'b1, 1'b1, 5'b00011);   // underflow
    // exact quotients (the inexact flag is not checked: it follows the approximation)
    issue(ONE, ONE, 1'b1);
    issue(64'h4018_0000_0000_0000, 64'h4008_0000_0000_0000, 1'b1);  // 6/3
    issue(64'h4008_0000_0000_0000, 64'h4008_0000_0000_0000, 1'b1);  // 3/3
    issue(64'h3FF8_0000_0000_0000, 64'h4010_0000_0000_0000, 1'b1);  // 1.5/4
    issue(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF, 1'b1);  // x/x
    issue(64'h3FFF_FFFF_FFFF_FFFF, ONE, 1'b1);                      // x/1
    issue(ONE, 64'h3FF0_0000_0000_0001, 1'b0);                      // just below 1
    for (int i = 0; i < NRAND; i++) begin
      issue(rand_fp(400), rand_fp(400), 1'b0);
      rnd_count++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    if (rd[0] != n || rd[1] != n) begin
      failures++;
      $display("results missing: %0d %0d of %0d", rd[0], rd[1], n);
    end
    $display("correctly rounded: case 1 %0d, case 2 %0d of %0d", exact_rounded[0],
             exact_rounded[1], rnd_count + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
