// twiddle_top: twiddle-factor generation feeding a radix-2 DIT butterfly,
// with the LUT scheme selectable at run time.
//
// One exponent sequencer produces, for the chosen FFT stage, the twiddle
// exponent of each butterfly. The same exponent drives four generators side
// by side, each an implementation of one storage/arithmetic trade-off:
//   single-level  one N/4-word quarter-wave table, no multipliers
//   two-level     coarse + fine tables of sqrt(N)/2 words, 4 multipliers
//   three-level   coarse + two fine resolutions, 8 multipliers
//   K-level       coarse + KLEVELS-1 fine resolutions
// scheme_i, sampled with start_i, picks which generator's twiddle feeds the
// butterfly for the whole pass; the butterfly data are delayed by exactly
// that generator's latency (2, 4, 6 or 2*KLEVELS cycles), so the choice
// trades table size against latency and multipliers, nothing else.
//
// Interface: pulse start_i with stage_i and scheme_i to begin a pass of N/2
// butterflies. Each cycle in_valid_i is high while busy_o is high, one
// butterfly's inputs (x0, x1) are accepted and paired with the next twiddle.
// The results leave on out_valid_o, with y0 = x0 + W*x1, y1 = x0 - W*x1 and
// the twiddle components used, LATENCY = 1 + generator latency + 3 cycles
// after the inputs. out_last_o marks the last butterfly of the pass. Do not
// start a new pass with a different scheme before the previous one has
// drained. Default: N = 2**20 points; the table sizes of each generator
// follow from N (512-word tables for the two-level scheme, 64-word tables
// for the three-level one, a 64-word coarse and three 16-word fine tables
// for the four-level one).
module twiddle_top #(
  parameter int unsigned LOG2_N  = 20,
  parameter int unsigned KLEVELS = 4,
  parameter int unsigned DW      = 24,
  parameter int unsigned W       = twiddle_pkg::TW_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start_i,
  input  logic [$clog2(LOG2_N)-1:0] stage_i,
  input  twiddle_pkg::scheme_e      scheme_i,
  output logic                      busy_o,
  input  logic                      in_valid_i,
  input  logic signed [DW-1:0]      x0_re_i,
  input  logic signed [DW-1:0]      x0_im_i,
  input  logic signed [DW-1:0]      x1_re_i,
  input  logic signed [DW-1:0]      x1_im_i,
  output logic                      out_valid_o,
  output logic                      out_last_o,
  output logic signed [W-1:0]       tw_cos_o,
  output logic signed [W-1:0]       tw_sin_o,
  output logic signed [DW+1:0]      y0_re_o,
  output logic signed [DW+1:0]      y0_im_o,
  output logic signed [DW+1:0]      y1_re_o,
  output logic signed [DW+1:0]      y1_im_o
);

  import twiddle_pkg::*;

  localparam int unsigned Q       = LOG2_N - 2;       // bits of a quadrant
  localparam int unsigned FINE2   = Q / 2;
  localparam int unsigned FINE3   = Q / 3;
  localparam int unsigned FINEK   = Q / KLEVELS;
  localparam int unsigned MAX_LAT = gen_latency((KLEVELS > 3) ? KLEVELS : 3);
  localparam int unsigned DATA_W  = 4 * DW + 1;       // x0, x1 and last flag

  // ---- exponent sequencer --------------------------------------------
  logic              k_valid, k_last;
  logic [LOG2_N-1:0] k;
  scheme_e           scheme_q;

  twiddle_addr_gen #(.LOG2_N(LOG2_N)) u_addr (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (start_i),
    .stage_i  (stage_i),
    .step_i   (in_valid_i),
    .valid_o  (k_valid),
    .last_o   (k_last),
    .k_o      (k),
    .active_o (busy_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       scheme_q <= SCHEME_1LEVEL;
    else if (start_i) scheme_q <= scheme_i;
  end

  // ---- the four generators --------------------------------------------
  logic                v1, v2, v3, vk;
  logic signed [W-1:0] c1, s1, c2, s2, c3, s3, ck, sk;

  twiddle_gen_1level #(.LOG2_N(LOG2_N), .W(W)) u_gen1 (
    .clk (clk), .rst_n (rst_n), .valid_i (k_valid), .k_i (k),
    .valid_o (v1), .cos_o (c1), .sin_o (s1)
  );

  twiddle_gen_2level #(.LOG2_N(LOG2_N), .LOG2_FINE(FINE2), .W(W)) u_gen2 (
    .clk (clk), .rst_n (rst_n), .valid_i (k_valid), .k_i (k),
    .valid_o (v2), .cos_o (c2), .sin_o (s2)
  );

  twiddle_gen_3level #(.LOG2_N(LOG2_N), .LOG2_FINE(FINE3), .W(W)) u_gen3 (
    .clk (clk), .rst_n (rst_n), .valid_i (k_valid), .k_i (k),
    .valid_o (v3), .cos_o (c3), .sin_o (s3)
  );

  twiddle_gen_klevel #(
    .LEVELS (KLEVELS), .LOG2_N (LOG2_N), .LOG2_FINE (FINEK), .W (W)
  ) u_genk (
    .clk (clk), .rst_n (rst_n), .valid_i (k_valid), .k_i (k),
    .valid_o (vk), .cos_o (ck), .sin_o (sk)
  );

  // ---- data alignment -------------------------------------------------
  // Inputs are registered once (matching the sequencer), then shifted
  // through MAX_LAT registers; the tap equal to the selected generator's
  // latency meets that generator's output.
  logic [4*DW-1:0]   data_q;
  logic [DATA_W-1:0] data_sr [MAX_LAT];

  always_ff @(posedge clk) begin
    data_q     <= {x0_re_i, x0_im_i, x1_re_i, x1_im_i};
    data_sr[0] <= {data_q, k_last};  // k_last is aligned with data_q
    for (int i = 1; i < MAX_LAT; i++) data_sr[i] <= data_sr[i-1];
  end

  logic                bf_valid, bf_last;
  logic signed [W-1:0] bf_cos, bf_sin;
  logic [DATA_W-1:0]   bf_data;

  always_comb begin
    unique case (scheme_q)
      SCHEME_1LEVEL: begin
        bf_valid = v1; bf_cos = c1; bf_sin = s1;
        bf_data  = data_sr[gen_latency(1) - 1];
      end
      SCHEME_2LEVEL: begin
        bf_valid = v2; bf_cos = c2; bf_sin = s2;
        bf_data  = data_sr[gen_latency(2) - 1];
      end
      SCHEME_3LEVEL: begin
        bf_valid = v3; bf_cos = c3; bf_sin = s3;
        bf_data  = data_sr[gen_latency(3) - 1];
      end
      default: begin
        bf_valid = vk; bf_cos = ck; bf_sin = sk;
        bf_data  = data_sr[gen_latency(KLEVELS) - 1];
      end
    endcase
    bf_last = bf_data[0];
  end

  // ---- butterfly --------------------------------------------------------
  radix2_butterfly #(.DW(DW), .TW_W(W)) u_bfly (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (bf_valid),
    .x0_re_i (bf_data[4*DW -: DW]),
    .x0_im_i (bf_data[3*DW -: DW]),
    .x1_re_i (bf_data[2*DW -: DW]),
    .x1_im_i (bf_data[DW -: DW]),
    .cos_i   (bf_cos),
    .sin_i   (bf_sin),
    .valid_o (out_valid_o),
    .y0_re_o (y0_re_o),
    .y0_im_o (y0_im_o),
    .y1_re_o (y1_re_o),
    .y1_im_o (y1_im_o)
  );

  // The twiddle components and last flag travel alongside the butterfly.
  pipe_delay #(.W(2*W + 1), .DEPTH(3)) u_tw_dly (
    .clk (clk),
    .d_i ({bf_cos, bf_sin, bf_last}),
    .q_o ({tw_cos_o, tw_sin_o, out_last_o})
  );

endmodule
