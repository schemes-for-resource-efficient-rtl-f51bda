// tb_quarter_sine_lut: reads every address of a 256-word quarter-wave table
// and checks, one cycle later, that the sine output is sin((pi/2) a / 256)
// and the cosine output cos((pi/2) a / 256), both to within 1 LSB. This
// includes address 0, whose cosine (1.0) lies outside the stored table.
module tb_quarter_sine_lut;
  localparam int unsigned LOG2_DEPTH = 8;
  localparam int unsigned W          = 24;
  localparam real         SCALE      = real'(1 << (W - 2));
  localparam real         HALF_PI    = 1.5707963267948966;

  logic clk = 1'b0;
  logic [LOG2_DEPTH-1:0] a_i = '0;
  logic signed [W-1:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  quarter_sine_lut #(.LOG2_DEPTH(LOG2_DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int a = 0; a < (1 << LOG2_DEPTH); a++) begin
      int es, ec;
      a_i <= LOG2_DEPTH'(a);
      @(posedge clk); #1;
      es = $rtoi($floor($sin(HALF_PI * a / (1 << LOG2_DEPTH)) * SCALE + 0.5));
      ec = $rtoi($floor($cos(HALF_PI * a / (1 << LOG2_DEPTH)) * SCALE + 0.5));
      checks += 2;
      if (iabs(int'(sin_o) - es) > 1) begin failures++; $display("FAIL sin a=%0d %0d/%0d", a, sin_o, es); end
      if (iabs(int'(cos_o) - ec) > 1) begin failures++; $display("FAIL cos a=%0d %0d/%0d", a, cos_o, ec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
