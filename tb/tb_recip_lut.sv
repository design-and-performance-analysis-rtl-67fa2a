// tb_recip_lut: self-checking testbench of the 1/Rh^2 table.
//
// For the default table (14 index bits) and a 10-bit table, every checked entry q must be
// 1/Rh^2 rounded down to F = 58 fraction bits, which is verified without division:
// q * (2^m + idx)^2 <= 2^(F+2m) < (q + 1) * (2^m + idx)^2. The first and last entries and
// random ones are checked, each one cycle after its index was applied.
module tb_recip_lut;

  localparam int F = 58;

  logic        clk = 1'b0;
  logic [13:0] idx14 = '0;
  logic [9:0]  idx10 = '0;
  logic [F+1:0] q14, q10;

  int checks = 0, failures = 0;

  recip_lut dut14 (.clk(clk), .idx(idx14), .q(q14));
  recip_lut #(.LUT_BITS(10), .F(F)) dut10 (.clk(clk), .idx(idx10), .q(q10));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_entry(int m, int idx, logic [F+1:0] q);
    logic [255:0] rh2, lo, hi, one;
    rh2 = (256'(1) << m) + 256'(idx);
    rh2 = rh2 * rh2;
    one = 256'(1) << (F + 2 * m);
    lo  = 256'(q) * rh2;
    hi  = (256'(q) + 256'd1) * rh2;
    checks++;
    if (!(lo <= one && one < hi)) begin
      failures++;
      $display("FAIL m=%0d idx=%0d q=%h", m, idx, q);
    end
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      int a, b;
      a = (i == 0) ? 0 : (i == 1) ? 16383 : int'($urandom_range(16383, 0));
      b = (i == 0) ? 0 : (i == 1) ? 1023  : int'($urandom_range(1023, 0));
      @(negedge clk);
      idx14 = 14'(a);
      idx10 = 10'(b);
      @(negedge clk);  // one clock edge later the entry is out
      check_entry(14, a, q14);
      check_entry(10, b, q10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
