// tb_twiddle_addr_gen: runs the exponent sequencer (N = 1024) through every
// stage s = 0..9, stepping with random gaps. For butterfly j of stage s the
// exponent must be (j mod 2**s) * 2**(9-s); last_o must mark exactly the
// 512th exponent; steps after it and before the next start must emit
// nothing.
module tb_twiddle_addr_gen;
  localparam int unsigned LOG2_N = 10;

  logic clk = 1'b0, rst_n = 1'b0, start_i = 1'b0, step_i = 1'b0;
  logic [$clog2(LOG2_N)-1:0] stage_i = '0;
  logic valid_o, last_o, active_o;
  logic [LOG2_N-1:0] k_o;
  int checks = 0, failures = 0;
  int j = 0, cur_stage = 0, lasts = 0;

  twiddle_addr_gen #(.LOG2_N(LOG2_N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && valid_o) begin
    int exp_k;
    exp_k = (j % (1 << cur_stage)) * (1 << (LOG2_N - 1 - cur_stage));
    checks += 2;
    if (int'(k_o) != exp_k) begin
      failures++;
      if (failures < 10) $display("FAIL s=%0d j=%0d k=%0d exp %0d", cur_stage, j, k_o, exp_k);
    end
    if (last_o != (j == (1 << (LOG2_N - 1)) - 1)) begin
      failures++; $display("FAIL last s=%0d j=%0d", cur_stage, j);
    end
    if (last_o) lasts++;
    j++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < LOG2_N; s++) begin
      start_i <= 1'b1; stage_i <= ($clog2(LOG2_N))'(s);
      @(posedge clk);
      start_i <= 1'b0;
      @(posedge clk);
      j = 0; cur_stage = s;
      // Step until the pass ends, plus some extra steps that must be ignored.
      while (active_o) begin
        step_i <= ($urandom_range(0, 4) != 0);
        @(posedge clk);
      end
      repeat (20) begin step_i <= 1'b1; @(posedge clk); end
      step_i <= 1'b0;
      @(posedge clk);
      checks++;
      if (j != (1 << (LOG2_N - 1))) begin
        failures++; $display("FAIL stage %0d produced %0d exponents", s, j);
      end
    end
    checks++;
    if (lasts != LOG2_N) begin failures++; $display("FAIL %0d last flags", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
