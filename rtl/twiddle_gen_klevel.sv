// twiddle_gen_klevel: twiddle-factor generator using a K-level LUT.
//
// Generalises the two- and three-level generators to LEVELS = K angular
// resolutions. The two top bits of the angle index k give the quadrant; the
// rest is split into a coarse field (LOG2_N - 2 - (K-1)*LOG2_FINE bits, most
// significant) and K-1 fine fields of LOG2_FINE bits. The coarse angle is
// looked up in a quarter-wave sine table read at two addresses; fine level
// m (1 <= m <= K-1, m = K-1 least significant) has its own sine and cosine
// tables covering steps of (pi/2) / 2**(LOG2_COARSE + m*LOG2_FINE).
//
// The angles are added with K-1 rotation stages: the finest level is rotated
// by the next coarser one, and so on, the coarse angle last, as in the
// three-level case. Each rotation is two pipeline tasks (products, then
// sums), so with the table read there are 2K-1 tasks, 4(K-1) multipliers and
// 2(K-1) adders besides the address arithmetic, plus a quadrant fold.
// valid_o follows valid_i by LATENCY = 2K cycles; one k enters per cycle.
// The defaults (K = 3, N = 2**30, 512-word fine tables) match the
// three-level generator.
module twiddle_gen_klevel #(
  parameter int unsigned LEVELS    = 3,
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

  localparam int unsigned LOG2_COARSE = LOG2_N - 2 - (LEVELS - 1) * LOG2_FINE;
  localparam int unsigned LATENCY     = twiddle_pkg::gen_latency(LEVELS);

  // Table outputs of every level (0 = coarse) and the running rotation
  // result after each stage (acc[0] = finest level straight from its table).
  logic signed [W-1:0] lvl_cos [LEVELS];
  logic signed [W-1:0] lvl_sin [LEVELS];
  logic signed [W-1:0] acc_cos [LEVELS];
  logic signed [W-1:0] acc_sin [LEVELS];
  logic [1:0]          quad_q;

  // Task 1: table reads.
  quarter_sine_lut #(.LOG2_DEPTH(LOG2_COARSE), .W(W)) u_coarse (
    .clk   (clk),
    .a_i   (k_i[LOG2_N-3 -: LOG2_COARSE]),
    .sin_o (lvl_sin[0]),
    .cos_o (lvl_cos[0])
  );

  for (genvar m = 1; m < LEVELS; m++) begin : g_fine
    fine_trig_lut #(
      .LOG2_DEPTH (LOG2_FINE),
      .LOG2_RES   (LOG2_COARSE + m * LOG2_FINE),
      .W          (W)
    ) u_fine (
      .clk   (clk),
      .f_i   (k_i[(LEVELS - m) * LOG2_FINE - 1 -: LOG2_FINE]),
      .sin_o (lvl_sin[m]),
      .cos_o (lvl_cos[m])
    );
  end

  assign acc_cos[0] = lvl_cos[LEVELS-1];
  assign acc_sin[0] = lvl_sin[LEVELS-1];

  // Rotation j adds the angle of level LEVELS-1-j, whose table output is
  // delayed by the 2(j-1) cycles of the rotations before it.
  for (genvar j = 1; j < LEVELS; j++) begin : g_rot
    logic signed [W-1:0] b_cos, b_sin;

    pipe_delay #(.W(2*W), .DEPTH(2*(j-1))) u_dly (
      .clk (clk),
      .d_i ({lvl_cos[LEVELS-1-j], lvl_sin[LEVELS-1-j]}),
      .q_o ({b_cos, b_sin})
    );

    rot_stage #(.W(W)) u_rot (
      .clk     (clk),
      .cos_a_i (b_cos),        .sin_a_i (b_sin),
      .cos_b_i (acc_cos[j-1]), .sin_b_i (acc_sin[j-1]),
      .cos_o   (acc_cos[j]),   .sin_o   (acc_sin[j])
    );
  end

  pipe_delay #(.W(2), .DEPTH(LATENCY - 1)) u_quad_dly (
    .clk (clk), .d_i (k_i[LOG2_N-1 -: 2]), .q_o (quad_q)
  );

  quadrant_fold #(.W(W)) u_fold (
    .clk    (clk),
    .quad_i (quad_q),
    .sin_i  (acc_sin[LEVELS-1]),
    .cos_i  (acc_cos[LEVELS-1]),
    .sin_o  (sin_o),
    .cos_o  (cos_o)
  );

  valid_pipe #(.DEPTH(LATENCY)) u_valid (
    .clk (clk), .rst_n (rst_n), .valid_i (valid_i), .valid_o (valid_o)
  );

endmodule
