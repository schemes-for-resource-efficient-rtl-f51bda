// tb_rot_stage: drives random angle pairs (a, b), quantised to 22 fractional
// bits, into the rotation stage one per cycle and checks that cos(a + b) and
// sin(a + b) appear exactly two cycles later, to within 2 LSB of the values
// computed in real arithmetic.
module tb_rot_stage;
  localparam int unsigned W      = 24;
  localparam int unsigned LAT    = 2;
  localparam real         SCALE  = real'(1 << (W - 2));
  localparam real         TWO_PI = 6.283185307179586;
  localparam int          N      = 3000;

  logic clk = 1'b0;
  logic signed [W-1:0] cos_a_i, sin_a_i, cos_b_i, sin_b_i, cos_o, sin_o;
  int checks = 0, failures = 0;
  real ang [N];

  rot_stage #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic logic signed [W-1:0] q(real v);
    return W'($rtoi($floor(v * SCALE + 0.5)));
  endfunction

  initial begin
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        real a, b;
        a = TWO_PI * $urandom_range(0, 65535) / 65536.0;
        b = TWO_PI * $urandom_range(0, 65535) / 65536.0;
        ang[i] = a + b;
        cos_a_i <= q($cos(a)); sin_a_i <= q($sin(a));
        cos_b_i <= q($cos(b)); sin_b_i <= q($sin(b));
      end
      // Inputs driven here are taken at the next edge; the result of the
      // inputs driven LAT-1 iterations ago is visible after that edge.
      @(posedge clk); #1;
      if (i >= LAT - 1) begin
        checks += 2;
        if (iabs(int'(cos_o) - int'(q($cos(ang[i-LAT+1])))) > 2) begin
          failures++; $display("FAIL cos %0d: %0d/%0d", i, cos_o, q($cos(ang[i-LAT+1])));
        end
        if (iabs(int'(sin_o) - int'(q($sin(ang[i-LAT+1])))) > 2) begin
          failures++; $display("FAIL sin %0d: %0d/%0d", i, sin_o, q($sin(ang[i-LAT+1])));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
