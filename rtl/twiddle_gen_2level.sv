// twiddle_gen_2level: twiddle-factor generator using a two-level LUT.
//
// For angle index k (0 <= k < N, N = 2**LOG2_N) it produces cos(2*pi*k/N)
// and sin(2*pi*k/N). The two top bits of k give the quadrant; the remaining
// LOG2_N-2 bits r are split as r = c * L + f, with L = 2**LOG2_FINE. The
// coarse angle theta = (pi/2) c / (N/4L) is looked up in a quarter-wave sine
// table of N/4L words, read at two addresses for sin(theta) and cos(theta);
// the fine angle phi = (pi/2) f / (N/4) is looked up in separate sine and
// cosine tables of L words each. The angle-addition identities then give
// the first-quadrant values, which are folded into the right quadrant.
//
// Pipeline, three tasks plus folding (one new k per cycle):
//   task 1  compute the table addresses and read the three tables
//   task 2  four products cos.cos, sin.sin, sin.cos, cos.sin
//   task 3  combine the product pairs: one subtraction, one addition
//   fold    quadrant swap and negate
// valid_o follows valid_i by LATENCY = 4 cycles. The defaults, N = 2**20 and
// L = 512 = sqrt(N)/2, make all three tables 512 words long (1536 words
// against 262144 for the single-level table).
module twiddle_gen_2level #(
  parameter int unsigned LOG2_N    = 20,
  parameter int unsigned LOG2_FINE = 9,
  parameter int unsigned W         = twiddle_pkg::TW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [LOG2_N-1:0]   k_i,
  output logic                valid_o,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);

  localparam int unsigned LOG2_COARSE = LOG2_N - 2 - LOG2_FINE;
  localparam int unsigned LATENCY     = twiddle_pkg::gen_latency(2);

  logic signed [W-1:0] c_sin, c_cos, f_sin, f_cos, r_sin, r_cos;
  logic [1:0]          quad_q;

  // Task 1: table reads.
  quarter_sine_lut #(.LOG2_DEPTH(LOG2_COARSE), .W(W)) u_coarse (
    .clk   (clk),
    .a_i   (k_i[LOG2_N-3 -: LOG2_COARSE]),
    .sin_o (c_sin),
    .cos_o (c_cos)
  );

  fine_trig_lut #(.LOG2_DEPTH(LOG2_FINE), .LOG2_RES(LOG2_N - 2), .W(W)) u_fine (
    .clk   (clk),
    .f_i   (k_i[LOG2_FINE-1:0]),
    .sin_o (f_sin),
    .cos_o (f_cos)
  );

  // Tasks 2 and 3: products and their additive combination.
  rot_stage #(.W(W)) u_rot (
    .clk     (clk),
    .cos_a_i (c_cos), .sin_a_i (c_sin),
    .cos_b_i (f_cos), .sin_b_i (f_sin),
    .cos_o   (r_cos), .sin_o   (r_sin)
  );

  pipe_delay #(.W(2), .DEPTH(LATENCY - 1)) u_quad_dly (
    .clk (clk), .d_i (k_i[LOG2_N-1 -: 2]), .q_o (quad_q)
  );

  quadrant_fold #(.W(W)) u_fold (
    .clk    (clk),
    .quad_i (quad_q),
    .sin_i  (r_sin),
    .cos_i  (r_cos),
    .sin_o  (sin_o),
    .cos_o  (cos_o)
  );

  valid_pipe #(.DEPTH(LATENCY)) u_valid (
    .clk (clk), .rst_n (rst_n), .valid_i (valid_i), .valid_o (valid_o)
  );

endmodule
