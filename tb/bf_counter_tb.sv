// bf_counter_tb: checks the global counter and the per-stage bf_bypass
// signals of a 16-point pipeline (LOGN = 4) against a count kept by the
// testbench: stage k bypasses while bit (LOGN-1-k) of (count - 2k) is 0, so
// stage 0 changes every N/2 enabled cycles and the last stage every cycle.
// Enable gaps are inserted at random.
module bf_counter_tb;
  localparam int LOGN = 4;
  localparam int N = 1 << LOGN;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [LOGN-1:0] cnt, bypass;
  always #5 clk = ~clk;

  bf_counter #(.LOGN(LOGN)) dut (.*);

  int checks = 0, failures = 0, t = 0, toggles0 = 0;
  logic last0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    last0 = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = ($urandom_range(5) != 0);
      #1;
      checks++;
      if (cnt != LOGN'(t)) begin
        failures++; $display("cnt %0d want %0d", cnt, t % N);
      end
      for (int k = 0; k < LOGN; k++) begin
        int loc;
        logic want;
        loc  = ((t - 2 * k) % N + N) % N;
        want = !((loc >> (LOGN - 1 - k)) & 1);
        checks++;
        if (bypass[k] !== want) begin
          failures++;
          if (failures < 10) $display("t %0d stage %0d: bypass %b want %b", t, k, bypass[k], want);
        end
      end
      if (en) begin
        if (bypass[0] != last0) toggles0++;
        last0 = bypass[0];
        t++;
      end
    end
    // stage 0 phase changes every N/2 enabled cycles
    checks++;
    if (toggles0 < (t / (N / 2)) - 1 || toggles0 > (t / (N / 2)) + 1) begin
      failures++; $display("stage 0 toggled %0d times in %0d cycles", toggles0, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
