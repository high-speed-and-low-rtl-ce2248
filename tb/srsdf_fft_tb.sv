// srsdf_fft_tb: end-to-end test of the split-radix SDF FFT pipeline at its
// default size (N = 64, 12-bit input, 12-bit twiddles).
//
// Streams NF frames back to back (an impulse, a constant, a single tone, and
// random frames with complex magnitude below 2^(L-1)), with random in_valid
// gaps in some frames so the global stall is exercised. Every result is
// compared with a directly computed double-precision DFT of its frame; the
// frequency bin is taken from the BIBR rule k = bitrev(~p) independently of
// the design's out_k, which is checked too. The latency of the first result
// (N + 2*log2 N - 1 enabled cycles after the first sample) and the one-frame-
// per-N-cycles rate are checked, and so is the number of nontrivial
// multiplications the two shared multipliers perform in one steady-state
// frame: 72, the split-radix count for 64 points. The test also counts how often each
// mechanism of the design occurred: st_mulj and st_csa butterflies, multiplier
// use on the pre and nxt link, skipped trivial twiddles, bypassed words and
// stalls, and fails if one never happened.
module srsdf_fft_tb;
  import srsdf_pkg::*;

  localparam int N    = 64;
  localparam int L    = 12;
  localparam int LOGN = $clog2(N);
  localparam int WOUT = L + LOGN;
  localparam int NF   = 8;
  localparam int LAT  = N - 1 + 2 * LOGN;
  localparam real TOL = 36.0;     // allowed |error| per part, output LSBs (5N/16 + 16)

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [L-1:0] in_re, in_im;
  logic out_valid, out_first;
  logic [LOGN-1:0] out_k;
  logic signed [WOUT-1:0] out_re, out_im;

  srsdf_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  int n_out = 0, en_cycles = 0, first_out_at = -1;
  real max_err = 0.0;

  // mechanism counters
  int c_nontriv = 0;             // nontrivial multiplications in one steady-state frame
  int c_mulj = 0, c_csa = 0, c_mul_pre = 0, c_mul_nxt = 0, c_trivial = 0, c_bypass = 0, c_stall = 0;

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  task automatic check_out(int idx);
    int f, p, k;
    real ar, ai, ang, er, ei;
    f = idx / N;
    p = idx % N;
    k = brev(~p & (N - 1), LOGN);
    ar = 0.0; ai = 0.0;
    for (int n = 0; n < N; n++) begin
      ang = 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
      ar += real'(xr[f][n]) * $cos(ang) + real'(xi[f][n]) * $sin(ang);
      ai += real'(xi[f][n]) * $cos(ang) - real'(xr[f][n]) * $sin(ang);
    end
    er = real'(out_re) - ar; if (er < 0) er = -er;
    ei = real'(out_im) - ai; if (ei < 0) ei = -ei;
    if (er > max_err) max_err = er;
    if (ei > max_err) max_err = ei;
    checks++;
    if (er > TOL || ei > TOL) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH frame %0d pos %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)",
                 f, p, k, out_re, out_im, ar, ai);
    end
    checks++;
    if (out_k != LOGN'(k) || out_first != (p == 0)) begin
      failures++;
      if (failures < 10) $display("INDEX frame %0d pos %0d: out_k %0d want %0d", f, p, out_k, k);
    end
  endtask

  // count mechanisms on every enabled cycle
  always @(posedge clk) if (rst_n) begin
    if (!in_valid) c_stall++;
    else begin
      en_cycles++;
      for (int k = 0; k < LOGN; k++) if (dut.bypass[k]) c_bypass++;
      if (dut.ln_mode[0] == ST_MULJ && !dut.bypass[1]) c_mulj++;
      if (dut.ln_mode[1] == ST_CSA && !dut.bypass[2]) c_csa++;
      if (dut.g_mul[0].u_mul.do_mul && !dut.g_mul[0].u_mul.use_nxt) c_mul_pre++;
      if (dut.g_mul[0].u_mul.do_mul &&  dut.g_mul[0].u_mul.use_nxt) c_mul_nxt++;
      if ((dut.bo_mode[1] == ST_CSA) && dut.g_mul[0].mul_mode) c_trivial++;
    end
  end

  // multiplications actually performed during enabled cycles [2N, 3N)
  for (genvar j = 0; j < (LOGN - 1) / 2; j++) begin : g_cnt
    always @(posedge clk)
      if (rst_n && in_valid && en_cycles >= 2 * N && en_cycles < 3 * N && dut.g_mul[j].u_mul.do_mul)
        c_nontriv++;
  end

  // collect outputs
  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out_at < 0) first_out_at = en_cycles - 1;
    if (n_out < NF * N) check_out(n_out);
    n_out++;
  end

  initial begin
    // stimulus
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          0: begin xr[f][n] = (n == 0) ? 1000 : 0; xi[f][n] = 0; end
          1: begin xr[f][n] = 1400; xi[f][n] = -700; end
          2: begin
               xr[f][n] = int'($floor(1400.0 * $cos(2.0 * 3.14159265358979 * 5 * n / N) + 0.5));
               xi[f][n] = int'($floor(1400.0 * $sin(2.0 * 3.14159265358979 * 5 * n / N) + 0.5));
             end
          default: begin
            do begin
              xr[f][n] = int'($urandom_range(4094)) - 2047;
              xi[f][n] = int'($urandom_range(4094)) - 2047;
            end while (xr[f][n] * xr[f][n] + xi[f][n] * xi[f][n] >= 2047 * 2047);
          end
        endcase
      end
    in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // frames, then zeros to flush the last one out
    for (int f = 0; f < NF + 2; f++)
      for (int n = 0; n < N; n++) begin
        if ((f == 4 || f == 6) && $urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 1'b0; in_re = 'x; in_im = 'x;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_re = (f < NF) ? L'(xr[f][n]) : '0;
        in_im = (f < NF) ? L'(xi[f][n]) : '0;
      end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(posedge clk);

    checks++;
    if (n_out < NF * N) begin
      failures++; $display("only %0d results", n_out);
    end
    // one result per enabled cycle once the pipeline is full
    checks++;
    if (n_out != en_cycles - LAT) begin
      failures++; $display("%0d results in %0d enabled cycles, want %0d", n_out, en_cycles, en_cycles - LAT);
    end
    checks++;
    if (first_out_at != LAT) begin
      failures++; $display("first result after %0d enabled cycles, want %0d", first_out_at, LAT);
    end
    $display("multiplications per frame %0d; max |error| %.2f LSB; mulj %0d csa %0d mul_pre %0d mul_nxt %0d trivial %0d bypass %0d stall %0d",
             c_nontriv, max_err, c_mulj, c_csa, c_mul_pre, c_mul_nxt, c_trivial, c_bypass, c_stall);
    checks++;
    if (c_nontriv != 72) begin
      failures++; $display("%0d nontrivial multiplications per frame, want 72", c_nontriv);
    end
    checks += 7;
    if (c_mulj == 0)    begin failures++; $display("st_mulj never happened"); end
    if (c_csa == 0)     begin failures++; $display("st_csa never happened"); end
    if (c_mul_pre == 0) begin failures++; $display("pre-link multiplication never happened"); end
    if (c_mul_nxt == 0) begin failures++; $display("nxt-link multiplication never happened"); end
    if (c_trivial == 0) begin failures++; $display("trivial twiddle skip never happened"); end
    if (c_bypass == 0)  begin failures++; $display("bypass never happened"); end
    if (c_stall == 0)   begin failures++; $display("stall never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N * NF) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
