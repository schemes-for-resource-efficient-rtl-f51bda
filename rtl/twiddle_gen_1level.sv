// twiddle_gen_1level: twiddle-factor generator using a single-level LUT.
//
// For angle index k (0 <= k < N, N = 2**LOG2_N) it produces the two
// components cos(2*pi*k/N) and sin(2*pi*k/N) of the twiddle factor
// W_N^k = cos(2*pi*k/N) - i*sin(2*pi*k/N). Only one quadrant of the sine
// function is stored, in a table of N/4 words: the two top bits of k select
// the quadrant and the remaining LOG2_N-2 bits address the table, once
// directly for the sine and once, reversed, for the cosine. No multiplier is
// needed; the cost is the O(N) table.
//
// Pipeline (one new k per cycle):
//   cycle 1  table read at the sine and cosine addresses (dual-port)
//   cycle 2  quadrant fold (swap and negate)
// valid_o follows valid_i by LATENCY = 2 cycles. Components are signed W-bit
// values with W-2 fractional bits. The default LOG2_N = 10 is the 1024-point
// case, for which a 256-word table suffices.
module twiddle_gen_1level #(
  parameter int unsigned LOG2_N = 10,
  parameter int unsigned W      = twiddle_pkg::TW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [LOG2_N-1:0]   k_i,
  output logic                valid_o,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);

  localparam int unsigned LATENCY = twiddle_pkg::gen_latency(1);

  logic [1:0]          quad_q;
  logic signed [W-1:0] lut_sin, lut_cos;

  quarter_sine_lut #(.LOG2_DEPTH(LOG2_N - 2), .W(W)) u_lut (
    .clk   (clk),
    .a_i   (k_i[LOG2_N-3:0]),
    .sin_o (lut_sin),
    .cos_o (lut_cos)
  );

  pipe_delay #(.W(2), .DEPTH(1)) u_quad_dly (
    .clk (clk), .d_i (k_i[LOG2_N-1 -: 2]), .q_o (quad_q)
  );

  quadrant_fold #(.W(W)) u_fold (
    .clk    (clk),
    .quad_i (quad_q),
    .sin_i  (lut_sin),
    .cos_i  (lut_cos),
    .sin_o  (sin_o),
    .cos_o  (cos_o)
  );

  valid_pipe #(.DEPTH(LATENCY)) u_valid (
    .clk (clk), .rst_n (rst_n), .valid_i (valid_i), .valid_o (valid_o)
  );

endmodule
