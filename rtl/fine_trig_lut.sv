// fine_trig_lut: sine and cosine tables of one fine angular resolution.
//
// A multi-level twiddle generator splits the angle into a coarse part and
// one or more fine parts. Each fine resolution needs one sine and one cosine
// table of equal length, each read at one address per cycle (single-port).
// Word i of the two tables holds sin(phi_i) and cos(phi_i) with
// phi_i = (pi/2) * i / 2**LOG2_RES, where 2**LOG2_RES is the number of steps
// that a quarter turn is divided into at this resolution. The tables are
// 2**LOG2_DEPTH words long, so they cover 0 up to
// (pi/2) * 2**(LOG2_DEPTH - LOG2_RES) radians.
//
// Interface: f_i is sampled on every rising clock edge; sin_o and cos_o are
// registered, valid one cycle later. Contents are computed at elaboration and
// rounded to W-2 fractional bits.
module fine_trig_lut #(
  parameter int unsigned LOG2_DEPTH = 9,
  parameter int unsigned LOG2_RES   = 18,
  parameter int unsigned W          = twiddle_pkg::TW_W
) (
  input  logic                    clk,
  input  logic [LOG2_DEPTH-1:0]   f_i,
  output logic signed [W-1:0]     sin_o,
  output logic signed [W-1:0]     cos_o
);

  localparam int unsigned DEPTH = 1 << LOG2_DEPTH;
  localparam real SCALE = real'(longint'(1) << (W - 2));
  localparam real STEP  = 1.5707963267948966 / real'(longint'(1) << LOG2_RES);

  logic signed [W-1:0] sin_rom [DEPTH];
  logic signed [W-1:0] cos_rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      sin_rom[i] = W'($rtoi($sin(STEP * real'(i)) * SCALE + 0.5));
      cos_rom[i] = W'($rtoi($cos(STEP * real'(i)) * SCALE + 0.5));
    end
  end

  always_ff @(posedge clk) begin
    sin_o <= sin_rom[f_i];
    cos_o <= cos_rom[f_i];
  end

endmodule
