// quadrant_fold: extends a first-quadrant sine/cosine pair to the full circle.
//
// The angle 2*pi*k/N is split into a quadrant number q (the two top bits of
// k) and a residual angle a in [0, pi/2). Given sin(a) and cos(a), the
// periodicity and symmetry of the sine and cosine functions give
//   q = 0: sin =  sin(a), cos =  cos(a)
//   q = 1: sin =  cos(a), cos = -sin(a)
//   q = 2: sin = -sin(a), cos = -cos(a)
//   q = 3: sin = -cos(a), cos =  sin(a)
// This swap-and-negate logic is what lets every scheme store only one
// quadrant of the trigonometric functions. The result is registered: the
// outputs follow the inputs by one clock cycle.
module quadrant_fold #(
  parameter int unsigned W = twiddle_pkg::TW_W
) (
  input  logic                clk,
  input  logic [1:0]          quad_i,
  input  logic signed [W-1:0] sin_i,
  input  logic signed [W-1:0] cos_i,
  output logic signed [W-1:0] sin_o,
  output logic signed [W-1:0] cos_o
);

  always_ff @(posedge clk) begin
    unique case (quad_i)
      2'd0: begin sin_o <=  sin_i; cos_o <=  cos_i; end
      2'd1: begin sin_o <=  cos_i; cos_o <= -sin_i; end
      2'd2: begin sin_o <= -sin_i; cos_o <= -cos_i; end
      default: begin sin_o <= -cos_i; cos_o <=  sin_i; end
    endcase
  end

endmodule
