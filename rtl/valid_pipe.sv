// valid_pipe: a resettable shift register that carries the valid flag of a
// pipeline stage by DEPTH clock cycles (DEPTH >= 1). After reset no stage
// holds a valid item.
module valid_pipe #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  output logic valid_o
);

  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else sr <= (sr << 1) | DEPTH'(valid_i);
  end

  assign valid_o = sr[DEPTH-1];

endmodule
