// tb_fine_trig_lut: reads every address of a 512-word fine table pair whose
// step is (pi/2)/2**18 (the fine tables of the default two-level generator)
// and checks, one cycle later, both outputs against sin and cos of that
// angle to within 1 LSB.
module tb_fine_trig_lut;
  localparam int unsigned LOG2_DEPTH = 9;
  localparam int unsigned LOG2_RES   = 18;
  localparam int unsigned W          = 24;
  localparam real         SCALE      = real'(1 << (W - 2));
  localparam real         HALF_PI    = 1.5707963267948966;

  logic clk = 1'b0;
  logic [LOG2_DEPTH-1:0] f_i = '0;
  logic signed [W-1:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  fine_trig_lut #(.LOG2_DEPTH(LOG2_DEPTH), .LOG2_RES(LOG2_RES), .W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int f = (1 << LOG2_DEPTH) - 1; f >= 0; f--) begin
      int es, ec;
      f_i <= LOG2_DEPTH'(f);
      @(posedge clk); #1;
      es = $rtoi($floor($sin(HALF_PI * f / (1 << LOG2_RES)) * SCALE + 0.5));
      ec = $rtoi($floor($cos(HALF_PI * f / (1 << LOG2_RES)) * SCALE + 0.5));
      checks += 2;
      if (iabs(int'(sin_o) - es) > 1) begin failures++; $display("FAIL sin f=%0d %0d/%0d", f, sin_o, es); end
      if (iabs(int'(cos_o) - ec) > 1) begin failures++; $display("FAIL cos f=%0d %0d/%0d", f, cos_o, ec); end
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
