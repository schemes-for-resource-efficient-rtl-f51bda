// tb_twiddle_gen_3level: self-checking test of the three-level generator at its default size (N = 2**30, 1024-word coarse and 512-word fine tables).
// Angle indices 0..4095 are applied one per cycle, then a strided sweep that
// visits every coarse table entry and every quadrant, then random indices
// with gaps in valid. Each result is compared with cos/sin computed in real
// arithmetic, to within 3 LSB, and must appear exactly LAT = 6 cycles
// after its index.
module tb_twiddle_gen_3level;
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

  twiddle_gen_3level #(.LOG2_N(LOG2_N), .W(W)) dut (.*);

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
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q_k.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", q_k.size()); end
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
