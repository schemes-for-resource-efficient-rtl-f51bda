// tb_twiddle_gen_klevel: self-checking test of the K-level generator at its
// default configuration (K = 3, N = 2**30). Two further instances, K = 2
// (16384-word tables) and K = 4 (coarse 128 words, fine 128 words), take the
// same index stream and are checked to within 2 and 4 LSB, with latencies of
// 4 and 8 cycles.
// Angle indices 0..4095 are applied one per cycle, then a strided sweep that
// visits every coarse table entry and every quadrant, then random indices
// with gaps in valid. Each result is compared with cos/sin computed in real
// arithmetic, to within 3 LSB, and must appear exactly LAT = 6 cycles
// after its index.
module tb_twiddle_gen_klevel;
  localparam int unsigned LOG2_N = 30;
  localparam int          NSEQ   = 4096;
  localparam int unsigned W      = 24;
  localparam int unsigned LAT    = 6;
  localparam int          TOL    = 3;
  localparam real         SCALE  = real'(1 << (W - 2));
  localparam real         TWO_PI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0, valid_o;
  logic [LOG2_N-1:0] k_i = '0;
  logic signed [W-1:0] cos_o, sin_o;
  int checks = 0, failures = 0, cycle = 0;
  int q_k[$], q_t[$];

  twiddle_gen_klevel #(.LOG2_N(LOG2_N), .W(W)) dut (.*);

  logic valid2, valid4;
  logic signed [W-1:0] cos2, sin2, cos4, sin4;
  int q2_k[$], q2_t[$], q4_k[$], q4_t[$];

  twiddle_gen_klevel #(.LEVELS(2), .LOG2_N(LOG2_N), .LOG2_FINE(14), .W(W)) dut2 (
    .clk, .rst_n, .valid_i, .k_i, .valid_o (valid2), .cos_o (cos2), .sin_o (sin2)
  );
  twiddle_gen_klevel #(.LEVELS(4), .LOG2_N(LOG2_N), .LOG2_FINE(7), .W(W)) dut4 (
    .clk, .rst_n, .valid_i, .k_i, .valid_o (valid4), .cos_o (cos4), .sin_o (sin4)
  );

  // Checks one result of the K = 2 or K = 4 instance against its queue.
  task automatic check_other(ref int qk[$], ref int qt[$], input logic signed [W-1:0] c,
                             input logic signed [W-1:0] sn, input int lat, input int tol);
    int k, t, ec, es;
    checks += 2;
    if (qk.size() == 0) begin failures++; $display("FAIL: unexpected output"); return; end
    k = qk.pop_front(); t = qt.pop_front();
    ec = $rtoi($floor($cos(TWO_PI * k / (1 << LOG2_N)) * SCALE + 0.5));
    es = $rtoi($floor($sin(TWO_PI * k / (1 << LOG2_N)) * SCALE + 0.5));
    if (iabs(int'(c) - ec) > tol || iabs(int'(sn) - es) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL lat%0d k=%0d cos %0d/%0d sin %0d/%0d", lat, k, c, ec, sn, es);
    end
    if (cycle - t != lat) begin failures++; $display("FAIL latency %0d, expected %0d", cycle - t, lat); end
  endtask

  always @(posedge clk) begin
    if (valid_i) begin
      q2_k.push_back(int'(k_i)); q2_t.push_back(cycle);
      q4_k.push_back(int'(k_i)); q4_t.push_back(cycle);
    end
    if (valid2 && rst_n) check_other(q2_k, q2_t, cos2, sin2, 4, 2);
    if (valid4 && rst_n) check_other(q4_k, q4_t, cos4, sin4, 8, 4);
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  always @(posedge clk) begin
    if (valid_i) begin q_k.push_back(int'(k_i)); q_t.push_back(cycle); end
    if (valid_o && rst_n) begin
      int k, t, ec, es;
      if (q_k.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        k = q_k.pop_front(); t = q_t.pop_front();
        ec = $rtoi($floor($cos(TWO_PI * k / (1 << LOG2_N)) * SCALE + 0.5));
        es = $rtoi($floor($sin(TWO_PI * k / (1 << LOG2_N)) * SCALE + 0.5));
        checks++;
        if (iabs(int'(cos_o) - ec) > TOL || iabs(int'(sin_o) - es) > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d cos %0d/%0d sin %0d/%0d", k, cos_o, ec, sin_o, es);
        end
        checks++;
        if (cycle - t != LAT) begin
          failures++; $display("FAIL latency %0d for k=%0d", cycle - t, k);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NSEQ; i++) begin
      valid_i <= 1'b1; k_i <= LOG2_N'(i); @(posedge clk);
    end
    for (int i = 0; i < NSEQ; i++) begin
      valid_i <= 1'b1; k_i <= LOG2_N'(i * ((1 << LOG2_N) / NSEQ) + NSEQ - 1 - i); @(posedge clk);
    end
    for (int i = 0; i < 20000; i++) begin
      valid_i <= ($urandom_range(0, 3) != 0); k_i <= LOG2_N'($urandom); @(posedge clk);
    end
    valid_i <= 1'b0;
    repeat (8 + 3) @(posedge clk);
    checks++;
    if (q_k.size() != 0 || q2_k.size() != 0 || q4_k.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", q_k.size()); end
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
