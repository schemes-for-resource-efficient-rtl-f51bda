// tb_quadrant_fold: for random first-quadrant angles a and every quadrant q
// it feeds (sin a, cos a) and q, and checks one cycle later that the outputs
// equal sin and cos of a + q*pi/2 to within 1 LSB.
module tb_quadrant_fold;
  localparam int unsigned W       = 24;
  localparam real         SCALE   = real'(1 << (W - 2));
  localparam real         HALF_PI = 1.5707963267948966;

  logic clk = 1'b0;
  logic [1:0] quad_i;
  logic signed [W-1:0] sin_i, cos_i, sin_o, cos_o;
  int checks = 0, failures = 0;

  quadrant_fold #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic logic signed [W-1:0] q(real v);
    return W'($rtoi($floor(v * SCALE + 0.5)));
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      real a, t;
      a = HALF_PI * $urandom_range(0, 4095) / 4096.0;
      quad_i <= 2'(i);
      sin_i <= q($sin(a)); cos_i <= q($cos(a));
      t = a + HALF_PI * (i % 4);
      @(posedge clk); #1;
      checks += 2;
      if (iabs(int'(sin_o) - int'(q($sin(t)))) > 1) begin failures++; $display("FAIL sin q=%0d", i % 4); end
      if (iabs(int'(cos_o) - int'(q($cos(t)))) > 1) begin failures++; $display("FAIL cos q=%0d", i % 4); end
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
