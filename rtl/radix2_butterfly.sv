// radix2_butterfly: decimation-in-time radix-2 butterfly.
//
// The twiddle factor W = cos - i*sin is applied to the second input, and
// the product is added to and subtracted from the first:
//   t    = W * x1 = (x1_re*cos + x1_im*sin) + i(x1_im*cos - x1_re*sin)
//   X[0] = x0 + t
//   X[1] = x0 - t
// cos_i and sin_i are the two twiddle components as produced by the
// generators (signed TW_W bits, TW_W-2 fractional bits); the data are signed
// DW-bit integers. The outputs are two bits wider than the inputs so that
// no overflow can occur; no scaling is applied.
//
// Pipeline (one butterfly per cycle): products (1), rounded sums forming t
// (2), add/subtract (3). valid_o follows valid_i by LATENCY = 3 cycles.
module radix2_butterfly #(
  parameter int unsigned DW   = 24,
  parameter int unsigned TW_W = twiddle_pkg::TW_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_i,
  input  logic signed [DW-1:0]   x0_re_i,
  input  logic signed [DW-1:0]   x0_im_i,
  input  logic signed [DW-1:0]   x1_re_i,
  input  logic signed [DW-1:0]   x1_im_i,
  input  logic signed [TW_W-1:0] cos_i,
  input  logic signed [TW_W-1:0] sin_i,
  output logic                   valid_o,
  output logic signed [DW+1:0]   y0_re_o,
  output logic signed [DW+1:0]   y0_im_o,
  output logic signed [DW+1:0]   y1_re_o,
  output logic signed [DW+1:0]   y1_im_o
);

  localparam int unsigned FRAC = TW_W - 2;
  localparam int unsigned PW   = DW + TW_W;

  // Stage 1: the four products of x1 and the twiddle components.
  logic signed [PW-1:0] p_rc, p_is, p_ic, p_rs;
  logic signed [DW-1:0] x0_re_1, x0_im_1, x0_re_2, x0_im_2;

  always_ff @(posedge clk) begin
    p_rc    <= x1_re_i * cos_i;
    p_is    <= x1_im_i * sin_i;
    p_ic    <= x1_im_i * cos_i;
    p_rs    <= x1_re_i * sin_i;
    x0_re_1 <= x0_re_i;
    x0_im_1 <= x0_im_i;
  end

  // Stage 2: t = W * x1, rounded back to integer data.
  logic signed [PW:0]   t_re_full, t_im_full;
  logic signed [DW:0]   t_re, t_im;

  always_comb begin
    t_re_full = (PW+1)'(p_rc) + (PW+1)'(p_is) + ((PW+1)'(1) <<< (FRAC - 1));
    t_im_full = (PW+1)'(p_ic) - (PW+1)'(p_rs) + ((PW+1)'(1) <<< (FRAC - 1));
  end

  always_ff @(posedge clk) begin
    t_re    <= (DW+1)'(t_re_full >>> FRAC);
    t_im    <= (DW+1)'(t_im_full >>> FRAC);
    x0_re_2 <= x0_re_1;
    x0_im_2 <= x0_im_1;
  end

  // Stage 3: sum and difference.
  always_ff @(posedge clk) begin
    y0_re_o <= (DW+2)'(x0_re_2) + (DW+2)'(t_re);
    y0_im_o <= (DW+2)'(x0_im_2) + (DW+2)'(t_im);
    y1_re_o <= (DW+2)'(x0_re_2) - (DW+2)'(t_re);
    y1_im_o <= (DW+2)'(x0_im_2) - (DW+2)'(t_im);
  end

  valid_pipe #(.DEPTH(3)) u_valid (
    .clk (clk), .rst_n (rst_n), .valid_i (valid_i), .valid_o (valid_o)
  );

endmodule
