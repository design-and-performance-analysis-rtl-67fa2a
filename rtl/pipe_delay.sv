// pipe_delay: a DEPTH-stage register chain that carries a WIDTH-bit word alongside a
// pipelined datapath. Each rising edge moves the word one stage on; with DEPTH = 0 it is a
// wire. Used to keep the side information of an operation (sign, exponent, special result,
// opcode) aligned with the arithmetic that takes several cycles. No reset: the valid bits that
// qualify the word are reset where they are kept.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stages [DEPTH];
    always_ff @(posedge clk) begin
      stages[0] <= d;
      for (int i = 1; i < DEPTH; i++)
        stages[i] <= stages[i-1];
    end
    assign q = stages[DEPTH-1];
  end

endmodule
