// tb_twiddle_top: end-to-end test of the twiddle generation and butterfly
// at N = 1024 (K-level generator with K = 4). For every scheme and for a set
// of FFT stages it runs one complete pass of N/2 butterflies with random
// data and random input gaps, and checks for each result:
//   - the twiddle components against cos/sin of 2*pi*k/N, with k the
//     exponent the radix-2 DIT stage needs for that butterfly;
//   - y0 = x0 + W x1 and y1 = x0 - W x1 against real arithmetic;
//   - the latency, 1 + (2, 4, 6 or 8 for the scheme) + 3 cycles;
//   - the last flag on the N/2-th result only.
// It also counts the mechanisms the design has and fails if one never
// happened: each scheme selected, exponent wrap-around at a group boundary,
// input gaps while a pass is active, and pass completion.
module tb_twiddle_top;
  import twiddle_pkg::*;

  localparam int unsigned LOG2_N  = 10;
  localparam int unsigned KLEVELS = 4;
  localparam int unsigned DW      = 24;
  localparam int unsigned W       = 24;
  localparam real         SCALE   = real'(1 << (W - 2));
  localparam real         TWO_PI  = 6.283185307179586;
  localparam int          TW_TOL  = 8;   // twiddle error bound, LSB
  localparam int          stages [4] = '{0, 3, 7, 9};

  logic clk = 1'b0, rst_n = 1'b0, start_i = 1'b0, in_valid_i = 1'b0;
  logic [$clog2(LOG2_N)-1:0] stage_i = '0;
  scheme_e scheme_i = SCHEME_1LEVEL;
  logic busy_o, out_valid_o, out_last_o;
  logic signed [DW-1:0] x0_re_i, x0_im_i, x1_re_i, x1_im_i;
  logic signed [W-1:0]  tw_cos_o, tw_sin_o;
  logic signed [DW+1:0] y0_re_o, y0_im_o, y1_re_o, y1_im_o;

  twiddle_top #(.LOG2_N(LOG2_N), .KLEVELS(KLEVELS), .DW(DW), .W(W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int cur_lat = 0, cur_stage = 0, j_in = 0, j_out = 0;
  int n_scheme [4] = '{0, 0, 0, 0};
  int n_wrap = 0, n_gap = 0, n_last = 0;
  logic signed [DW-1:0] q_x [$];
  int q_t [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic int lat_of(scheme_e s);
    case (s)
      SCHEME_1LEVEL: return 1 + 2 + 3;
      SCHEME_2LEVEL: return 1 + 4 + 3;
      SCHEME_3LEVEL: return 1 + 6 + 3;
      default:       return 1 + 2 * KLEVELS + 3;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid_i && busy_o && !start_i) begin
      q_x.push_back(x0_re_i); q_x.push_back(x0_im_i);
      q_x.push_back(x1_re_i); q_x.push_back(x1_im_i);
      q_t.push_back(cycle);
    end
    if (rst_n && busy_o && !in_valid_i) n_gap++;
    if (rst_n && out_valid_o) begin
      int k, ec, es, t;
      real c, s, tr, ti, xr0, xi0, xr1, xi1, tol;
      k = (j_out % (1 << cur_stage)) * (1 << (LOG2_N - 1 - cur_stage));
      if (j_out > 0 && k == 0) n_wrap++;
      ec = $rtoi($floor($cos(TWO_PI * k / real'(1 << LOG2_N)) * SCALE + 0.5));
      es = $rtoi($floor($sin(TWO_PI * k / real'(1 << LOG2_N)) * SCALE + 0.5));
      checks++;
      if (iabs(int'(tw_cos_o) - ec) > TW_TOL || iabs(int'(tw_sin_o) - es) > TW_TOL) begin
        failures++;
        if (failures < 10) $display("FAIL twiddle j=%0d k=%0d (%0d,%0d) exp (%0d,%0d)",
                                    j_out, k, tw_cos_o, tw_sin_o, ec, es);
      end
      checks++;
      if (q_t.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        t = q_t.pop_front();
        xr0 = real'(q_x.pop_front()); xi0 = real'(q_x.pop_front());
        xr1 = real'(q_x.pop_front()); xi1 = real'(q_x.pop_front());
        if (cycle - t != cur_lat) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d exp %0d", cycle - t, cur_lat);
        end
        // Reference with the exact twiddle; the tolerance covers rounding
        // of the product and the twiddle error bound.
        c = $cos(TWO_PI * k / real'(1 << LOG2_N));
        s = $sin(TWO_PI * k / real'(1 << LOG2_N));
        tr = xr1 * c + xi1 * s;
        ti = xi1 * c - xr1 * s;
        tol = 1.5 + ((xr1 < 0 ? -xr1 : xr1) + (xi1 < 0 ? -xi1 : xi1)) * TW_TOL / SCALE;
        checks++;
        if ((real'(y0_re_o) - (xr0 + tr)) > tol || ((xr0 + tr) - real'(y0_re_o)) > tol ||
            (real'(y0_im_o) - (xi0 + ti)) > tol || ((xi0 + ti) - real'(y0_im_o)) > tol ||
            (real'(y1_re_o) - (xr0 - tr)) > tol || ((xr0 - tr) - real'(y1_re_o)) > tol ||
            (real'(y1_im_o) - (xi0 - ti)) > tol || ((xi0 - ti) - real'(y1_im_o)) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL butterfly j=%0d", j_out);
        end
      end
      checks++;
      if (out_last_o != (j_out == (1 << (LOG2_N - 1)) - 1)) begin
        failures++; $display("FAIL last flag at j=%0d", j_out);
      end
      if (out_last_o) n_last++;
      j_out++;
    end
  end

  // One complete pass of N/2 butterflies in the given stage and scheme.
  task automatic run_pass(int stage, scheme_e scheme, int gap_pct);
    start_i <= 1'b1; stage_i <= ($clog2(LOG2_N))'(stage); scheme_i <= scheme;
    @(posedge clk);
    start_i <= 1'b0;
    cur_stage = stage; cur_lat = lat_of(scheme); j_out = 0; j_in = 0;
    n_scheme[int'(scheme)]++;
    while (j_in < (1 << (LOG2_N - 1))) begin
      logic v;
      v = ($urandom_range(0, 99) >= gap_pct);
      in_valid_i <= v;
      x0_re_i <= DW'($urandom); x0_im_i <= DW'($urandom);
      x1_re_i <= DW'($urandom); x1_im_i <= DW'($urandom);
      @(posedge clk);
      if (v) j_in++;
    end
    in_valid_i <= 1'b0;
    repeat (cur_lat + 4) @(posedge clk);
    checks++;
    if (j_out != (1 << (LOG2_N - 1)) || q_t.size() != 0) begin
      failures++; $display("FAIL pass stage %0d scheme %0d: %0d results", stage, scheme, j_out);
    end
  endtask

  task automatic report();
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_scheme[s] == 0) begin failures++; $display("FAIL scheme %0d never used", s); end
    end
    checks += 3;
    if (n_wrap == 0) begin failures++; $display("FAIL no exponent wrap-around"); end
    if (n_gap == 0)  begin failures++; $display("FAIL no input gap"); end
    if (n_last == 0) begin failures++; $display("FAIL no pass completed"); end
    $display("mechanisms: schemes %0d/%0d/%0d/%0d wraps %0d gaps %0d passes %0d",
             n_scheme[0], n_scheme[1], n_scheme[2], n_scheme[3], n_wrap, n_gap, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int sc = 0; sc < 4; sc++) begin
      foreach (stages[i]) run_pass(stages[i], scheme_e'(sc), 20);
    end
    report();
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
