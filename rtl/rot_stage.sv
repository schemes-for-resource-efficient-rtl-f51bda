// rot_stage: angle addition by the trigonometric identities
//   cos(a + b) = cos(a) cos(b) - sin(a) sin(b)
//   sin(a + b) = sin(a) cos(b) + cos(a) sin(b)
//
// It is the arithmetic core of every multi-level twiddle generator and is
// built as two short pipeline tasks: the first forms the four products with
// four multipliers and registers them at full precision; the second combines
// the products in pairs with one subtractor and one adder, rounds the result
// to W-2 fractional bits (round half up) and registers it.
//
// Interface: (cos_a_i, sin_a_i) and (cos_b_i, sin_b_i) are sampled on every
// rising edge; (cos_o, sin_o) appear two cycles later. A new pair may enter
// every cycle. No valid signal is carried; the caller tracks validity. All
// values are signed with W-2 fractional bits.
module rot_stage #(
  parameter int unsigned W = twiddle_pkg::TW_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] cos_a_i,
  input  logic signed [W-1:0] sin_a_i,
  input  logic signed [W-1:0] cos_b_i,
  input  logic signed [W-1:0] sin_b_i,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);

  localparam int unsigned FRAC = W - 2;
  localparam int unsigned PW   = 2 * W;

  // Task: four trigonometric products.
  logic signed [PW-1:0] p_cc, p_ss, p_sc, p_cs;

  always_ff @(posedge clk) begin
    p_cc <= cos_a_i * cos_b_i;
    p_ss <= sin_a_i * sin_b_i;
    p_sc <= sin_a_i * cos_b_i;
    p_cs <= cos_a_i * sin_b_i;
  end

  // Task: additive combination of the product pairs, then rounding.
  logic signed [PW:0] sum_c, sum_s;

  always_comb begin
    sum_c = (PW+1)'(p_cc) - (PW+1)'(p_ss) + ((PW+1)'(1) <<< (FRAC - 1));
    sum_s = (PW+1)'(p_sc) + (PW+1)'(p_cs) + ((PW+1)'(1) <<< (FRAC - 1));
  end

  always_ff @(posedge clk) begin
    cos_o <= W'(sum_c >>> FRAC);
    sin_o <= W'(sum_s >>> FRAC);
  end

endmodule
