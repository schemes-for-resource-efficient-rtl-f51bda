// twiddle_gen_3level: twiddle-factor generator using a three-level LUT.
//
// For angle index k (0 <= k < N, N = 2**LOG2_N) it produces cos(2*pi*k/N)
// and sin(2*pi*k/N). The two top bits of k give the quadrant; the remaining
// bits are split into a coarse field c (LOG2_COARSE bits) and two fine
// fields f1 and f2 (LOG2_FINE bits each), giving the angles
//   theta = (pi/2) c / 2**LOG2_COARSE                     (coarse table)
//   phi1  = (pi/2) f1 / 2**(LOG2_COARSE + LOG2_FINE)      (first fine pair)
//   phi2  = (pi/2) f2 / 2**(LOG2_N - 2)                   (second fine pair)
// The identities are applied twice: first
//   A - B = cos(phi1) cos(phi2) - sin(phi1) sin(phi2) = cos(phi1 + phi2)
//   C + D = sin(phi1) cos(phi2) + cos(phi1) sin(phi2) = sin(phi1 + phi2)
// and then
//   cos = cos(theta) (A - B) - sin(theta) (C + D)
//   sin = sin(theta) (A - B) + cos(theta) (C + D).
//
// Pipeline, five tasks plus folding (one new k per cycle):
//   task 1  table reads (coarse table at two addresses, four fine tables)
//   task 2  products A, B, C, D
//   task 3  A - B and C + D
//   task 4  products with cos(theta) and sin(theta), delayed two cycles
//   task 5  final subtraction and addition
//   fold    quadrant swap and negate
// valid_o follows valid_i by LATENCY = 6 cycles. Defaults: N = 2**30 with a
// 1024-word coarse table and four 512-word fine tables (3072 words in all);
// the coarse field takes whatever bits the two fine fields leave.
module twiddle_gen_3level #(
  parameter int unsigned LOG2_N    = 30,
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

  localparam int unsigned LOG2_COARSE = LOG2_N - 2 - 2 * LOG2_FINE;
  localparam int unsigned LATENCY     = twiddle_pkg::gen_latency(3);

  logic signed [W-1:0] c_sin, c_cos, c_sin_d, c_cos_d;
  logic signed [W-1:0] f1_sin, f1_cos, f2_sin, f2_cos;
  logic signed [W-1:0] ab, cd, r_sin, r_cos;
  logic [1:0]          quad_q;

  // Task 1: table reads.
  quarter_sine_lut #(.LOG2_DEPTH(LOG2_COARSE), .W(W)) u_coarse (
    .clk   (clk),
    .a_i   (k_i[LOG2_N-3 -: LOG2_COARSE]),
    .sin_o (c_sin),
    .cos_o (c_cos)
  );

  fine_trig_lut #(
    .LOG2_DEPTH (LOG2_FINE),
    .LOG2_RES   (LOG2_COARSE + LOG2_FINE),
    .W          (W)
  ) u_fine1 (
    .clk   (clk),
    .f_i   (k_i[2*LOG2_FINE-1 -: LOG2_FINE]),
    .sin_o (f1_sin),
    .cos_o (f1_cos)
  );

  fine_trig_lut #(.LOG2_DEPTH(LOG2_FINE), .LOG2_RES(LOG2_N - 2), .W(W)) u_fine2 (
    .clk   (clk),
    .f_i   (k_i[LOG2_FINE-1:0]),
    .sin_o (f2_sin),
    .cos_o (f2_cos)
  );

  // Tasks 2 and 3: A, B, C, D and their combinations A - B, C + D.
  rot_stage #(.W(W)) u_rot_fine (
    .clk     (clk),
    .cos_a_i (f1_cos), .sin_a_i (f1_sin),
    .cos_b_i (f2_cos), .sin_b_i (f2_sin),
    .cos_o   (ab),     .sin_o   (cd)
  );

  // The coarse values wait for tasks 2 and 3.
  pipe_delay #(.W(2*W), .DEPTH(2)) u_coarse_dly (
    .clk (clk), .d_i ({c_cos, c_sin}), .q_o ({c_cos_d, c_sin_d})
  );

  // Tasks 4 and 5: rotation by the coarse angle.
  rot_stage #(.W(W)) u_rot_coarse (
    .clk     (clk),
    .cos_a_i (c_cos_d), .sin_a_i (c_sin_d),
    .cos_b_i (ab),      .sin_b_i (cd),
    .cos_o   (r_cos),   .sin_o   (r_sin)
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
