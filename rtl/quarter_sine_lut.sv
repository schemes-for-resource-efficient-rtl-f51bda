// quarter_sine_lut: quarter-wave sine table read at two addresses at once.
//
// The table holds DEPTH = 2**LOG2_DEPTH words, word i being
// sin((pi/2) * i / DEPTH), i.e. one quadrant of the sine function sampled at
// DEPTH points. Because cos(x) = sin(pi/2 - x), the same table also gives the
// cosine: for angle index a the sine is read at address a and the cosine at
// address DEPTH - a (one subtraction). The cosine address DEPTH itself lies
// just past the end of the table; it only arises for a = 0, where the value
// 1.0 is supplied by the read logic instead, so the table stays DEPTH words
// long. This is the single-level LUT of the single-quadrant scheme and the
// coarse-resolution LUT of the multi-level schemes, which need two
// simultaneous reads (a dual-port memory).
//
// Interface: angle index a_i is sampled on every rising clock edge; sin_o and
// cos_o are registered and valid one cycle later (synchronous-read memory).
// The table contents are computed at elaboration from sin(); they stand for a
// pre-computed ROM. Values are rounded to TW_W-2 fractional bits.
module quarter_sine_lut #(
  parameter int unsigned LOG2_DEPTH = 8,
  parameter int unsigned W          = twiddle_pkg::TW_W
) (
  input  logic                    clk,
  input  logic [LOG2_DEPTH-1:0]   a_i,
  output logic signed [W-1:0]     sin_o,
  output logic signed [W-1:0]     cos_o
);

  localparam int unsigned DEPTH = 1 << LOG2_DEPTH;
  localparam logic signed [W-1:0] ONE = W'(1) << (W - 2);

  logic signed [W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom[i] = W'($rtoi($sin(1.5707963267948966 * real'(i) / real'(DEPTH))
                        * real'(ONE) + 0.5));
    end
  end

  // Cosine address: DEPTH - a, wrapped to LOG2_DEPTH bits (0 when a = 0).
  logic [LOG2_DEPTH-1:0] cos_addr;
  assign cos_addr = LOG2_DEPTH'(DEPTH - {1'b0, a_i});

  always_ff @(posedge clk) begin
    sin_o <= rom[a_i];
    cos_o <= (a_i == '0) ? ONE : rom[cos_addr];
  end

endmodule
