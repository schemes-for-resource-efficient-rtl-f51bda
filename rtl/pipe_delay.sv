// pipe_delay: a chain of DEPTH registers that delays a W-bit word by DEPTH
// clock cycles (DEPTH = 0 is a plain wire). Used to keep operands, quadrant
// bits and data aligned with the arithmetic pipelines of the generators.
// The registers have no reset; validity is tracked separately by the caller.
// With DEPTH = 0 the clock input is left unused, which lint reports.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);

  if (DEPTH == 0) begin : g_wire
    assign q_o = d_i;
  end else begin : g_regs
    logic [W-1:0] stages [DEPTH];
    always_ff @(posedge clk) begin
      stages[0] <= d_i;
      for (int i = 1; i < DEPTH; i++) stages[i] <= stages[i-1];
    end
    assign q_o = stages[DEPTH-1];
  end

endmodule
