// twiddle_addr_gen: twiddle-exponent sequencer for one radix-2 DIT stage.
//
// In stage s (0 <= s < LOG2_N) of a radix-2 decimation-in-time FFT of
// N = 2**LOG2_N points, butterfly j uses the twiddle W_N^k with
// k = (j mod 2**s) * 2**(LOG2_N-1-s). Those exponents form an arithmetic
// sequence with the fixed increment 2**(LOG2_N-1-s), taken modulo N/2: the
// sum wraps to zero exactly when a new group of butterflies starts. So one
// accumulator and one adder produce the whole sequence.
//
// Interface: start_i (one cycle) loads the stage number and clears the
// accumulator and the butterfly counter. Each cycle with step_i high while a
// pass is active emits the next exponent: k_o and valid_o are registered
// and appear the next cycle; last_o marks the N/2-th and final exponent of
// the pass, after which step_i is ignored until the next start_i. start_i
// takes precedence over step_i in the same cycle. k_o is LOG2_N bits wide,
// the width of the generators' angle index, but its top bit is always 0:
// radix-2 DIT twiddles only use angles in [0, pi).
module twiddle_addr_gen #(
  parameter int unsigned LOG2_N = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start_i,
  input  logic [$clog2(LOG2_N)-1:0] stage_i,
  input  logic                      step_i,
  output logic                      valid_o,
  output logic                      last_o,
  output logic [LOG2_N-1:0]         k_o,
  output logic                      active_o
);

  localparam int unsigned HW = LOG2_N - 1;  // width of an exponent below N/2

  logic [HW-1:0] acc, inc, count;
  logic          active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      inc     <= '0;
      count   <= '0;
      active  <= 1'b0;
      valid_o <= 1'b0;
      last_o  <= 1'b0;
      k_o     <= '0;
    end else begin
      valid_o <= 1'b0;
      last_o  <= 1'b0;
      if (start_i) begin
        acc    <= '0;
        inc    <= HW'(1) << (HW - int'(stage_i));  // 0 for stage 0
        count  <= '0;
        active <= 1'b1;
      end else if (step_i && active) begin
        k_o     <= {1'b0, acc};
        valid_o <= 1'b1;
        last_o  <= (count == '1);
        acc     <= acc + inc;   // wraps modulo N/2
        count   <= count + 1'b1;
        if (count == '1) active <= 1'b0;
      end
    end
  end

  assign active_o = active;

  // The stage number must address a stage of the transform.
  a_stage_range : assert property (@(posedge clk)
                                   start_i |-> int'(stage_i) < LOG2_N);

endmodule
