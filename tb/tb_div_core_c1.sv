// tb_div_core_c1: self-checking testbench of the Case 1 significand divider.
//
// Feeds one significand pair per cycle and compares q with the exact quotient floor(P*2^F/R)
// from integer division. The approximation may exceed the exact quotient by at most ERR_OVER
// units of 2^-F (truncating A*R makes 2 - A*R slightly large) and must stay
// within ERR_MAX units of 2^-F (2^-54 at F = 58) below it: tight enough for the result to
// round faithfully to 53 bits. Directed pairs include R = 1, the largest algorithmic error
// (Rl just below 2^-LUT_BITS with Rh = 1) and extreme P. The latency must be 3 cycles.
module tb_div_core_c1;

  localparam int F       = 58;
  localparam int LATENCY = 3;
  localparam int ERR_MAX = 16;
  localparam int ERR_OVER = 4;
  localparam int NRAND   = 3000;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [52:0]  p_sig = {1'b1, 52'd0}, r_sig = {1'b1, 52'd0};
  logic         out_valid;
  logic [F+1:0] q;

  int checks = 0, failures = 0, cycle = 0;
  longint max_err = 0;

  typedef struct { logic [52:0] p, r; int issued; } exp_t;
  exp_t expq[$];

  div_core_c1 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(logic [52:0] p, logic [52:0] r);
    exp_t e;
    @(negedge clk);
    in_valid = 1'b1; p_sig = p; r_sig = r;
    e.p = p; e.r = r; e.issued = cycle;
    expq.push_back(e);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      logic [127:0] exact;
      longint err;
      e = expq.pop_front();
      exact = (128'(e.p) << F) / 128'(e.r);
      err = longint'(exact) - longint'(q);
      if (err > max_err) max_err = err;
      checks++;
      if (err < -ERR_OVER || err > ERR_MAX || (cycle - e.issued) != LATENCY) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%h r=%h q=%h exact=%h err=%0d lat=%0d", e.p, e.r, q, exact, err,
                   cycle - e.issued);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    issue({1'b1, 52'd0}, {1'b1, 52'd0});
    issue({53{1'b1}}, {1'b1, 52'd0});
    issue({1'b1, 52'd0}, {53{1'b1}});
    issue({53{1'b1}}, {1'b1, 14'd0, {38{1'b1}}});
    issue({1'b1, 52'd0}, {1'b1, 14'd0, {38{1'b1}}});
    issue({1'b1, 52'd0}, {1'b1, 14'd1, {38{1'b1}}});
    for (int i = 0; i < NRAND; i++)
      issue({1'b1, 20'($urandom), $urandom}, {1'b1, 20'($urandom), $urandom});
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results missing", expq.size());
    end
    $display("largest error: %0d units of 2^-%0d", max_err, F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
