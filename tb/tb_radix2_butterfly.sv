// tb_radix2_butterfly: feeds random complex inputs and random twiddle
// factors W = cos(a) - i sin(a), with valid gaps, and checks that
// y0 = x0 + W x1 and y1 = x0 - W x1 appear exactly 3 cycles later, to within
// 1 LSB of the product computed in real arithmetic.
module tb_radix2_butterfly;
  localparam int unsigned DW     = 24;
  localparam int unsigned TW_W   = 24;
  localparam int unsigned LAT    = 3;
  localparam real         SCALE  = real'(1 << (TW_W - 2));
  localparam real         TWO_PI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0, valid_o;
  logic signed [DW-1:0] x0_re_i, x0_im_i, x1_re_i, x1_im_i;
  logic signed [TW_W-1:0] cos_i, sin_i;
  logic signed [DW+1:0] y0_re_o, y0_im_o, y1_re_o, y1_im_o;
  int checks = 0, failures = 0, cycle = 0;
  real e0r[$], e0i[$], e1r[$], e1i[$];
  int  t_in[$];

  radix2_butterfly #(.DW(DW), .TW_W(TW_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit near(real got, real want);
    return (got - want) <= 1.0 && (want - got) <= 1.0;
  endfunction

  always @(posedge clk) begin
    if (valid_i) begin
      real c, s, tr, ti;
      c = real'(cos_i) / SCALE; s = real'(sin_i) / SCALE;
      tr = real'(x1_re_i) * c + real'(x1_im_i) * s;
      ti = real'(x1_im_i) * c - real'(x1_re_i) * s;
      e0r.push_back(real'(x0_re_i) + tr); e0i.push_back(real'(x0_im_i) + ti);
      e1r.push_back(real'(x0_re_i) - tr); e1i.push_back(real'(x0_im_i) - ti);
      t_in.push_back(cycle);
    end
    if (rst_n && valid_o) begin
      checks += 2;
      if (t_in.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        real a, b, c2, d;
        int t;
        a = e0r.pop_front(); b = e0i.pop_front(); c2 = e1r.pop_front(); d = e1i.pop_front();
        t = t_in.pop_front();
        if (!near(real'(y0_re_o), a) || !near(real'(y0_im_o), b) ||
            !near(real'(y1_re_o), c2) || !near(real'(y1_im_o), d)) begin
          failures++;
          if (failures < 10) $display("FAIL y0=(%0d,%0d) exp (%f,%f) y1=(%0d,%0d) exp (%f,%f)",
                                      y0_re_o, y0_im_o, a, b, y1_re_o, y1_im_o, c2, d);
        end
        if (cycle - t != LAT) begin failures++; $display("FAIL latency %0d", cycle - t); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      real a;
      a = TWO_PI * $urandom_range(0, 65535) / 65536.0;
      valid_i <= ($urandom_range(0, 3) != 0);
      x0_re_i <= DW'($urandom); x0_im_i <= DW'($urandom);
      x1_re_i <= DW'($urandom); x1_im_i <= DW'($urandom);
      cos_i <= TW_W'($rtoi($floor($cos(a) * SCALE + 0.5)));
      sin_i <= TW_W'($rtoi($floor($sin(a) * SCALE + 0.5)));
      @(posedge clk);
    end
    valid_i <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (t_in.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
