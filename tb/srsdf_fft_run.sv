// srsdf_fft_run: end-to-end check of the split-radix SDF FFT pipeline at a
// chosen size N, used by srsdf_fft_sizes_tb. It streams NF frames (impulse,
// constant, tone, random with complex magnitude below 2^(L-1)) with random
// enable gaps, compares every result with a double-precision DFT of its frame
// (bin from the BIBR rule k = bitrev(~position)), checks the first-result
// latency N-1+2*log2N, counts the nontrivial multiplications the shared
// multipliers perform in one steady-state frame against the split-radix count
// MULS, and checks that every mechanism (st_mulj, st_csa, pre/nxt link
// multiplication, trivial-twiddle skip, bypass, stall) occurred. It raises
// done when finished and leaves $finish to its parent.
module srsdf_fft_run #(
  parameter int  N    = 16,
  parameter int  NF   = 5,
  parameter int  MULS = 8,       // nontrivial multiplications per frame (split-radix count)
  // allowed |error| per part in output LSBs: the direct truncation of the
  // multiplier rows biases results low, up to about N/4 LSB in one bin
  parameter real TOL  = 5.0 * real'(N) / 16.0 + 16.0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import srsdf_pkg::*;

  localparam int L    = 12;
  localparam int LOGN = $clog2(N);
  localparam int WOUT = L + LOGN;
  localparam int LAT  = N - 1 + 2 * LOGN;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [L-1:0] in_re, in_im;
  logic out_valid, out_first;
  logic [LOGN-1:0] out_k;
  logic signed [WOUT-1:0] out_re, out_im;

  srsdf_fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin checks = 0; failures = 0; done = 1'b0; end
  int xr [NF][N], xi [NF][N];
  real ctab [N], stab [N];       // cos and sin of 2*pi*e/N for the reference DFT
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
    real ar, ai, er, ei;
    f = idx / N;
    p = idx % N;
    k = brev(~p & (N - 1), LOGN);
    ar = 0.0; ai = 0.0;
    for (int n = 0; n < N; n++) begin
      int e;
      e = (n * k) % N;
      ar += real'(xr[f][n]) * ctab[e] + real'(xi[f][n]) * stab[e];
      ai += real'(xi[f][n]) * ctab[e] - real'(xr[f][n]) * stab[e];
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
    for (int e = 0; e < N; e++) begin
      ctab[e] = $cos(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
      stab[e] = $sin(2.0 * 3.14159265358979323846 * real'(e) / real'(N));
    end
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
        if ((f == 1 || f == NF - 1) && $urandom_range(3) == 0) begin
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
    $display("max |error| %.2f LSB; mulj %0d csa %0d mul_pre %0d mul_nxt %0d trivial %0d bypass %0d stall %0d",
             max_err, c_mulj, c_csa, c_mul_pre, c_mul_nxt, c_trivial, c_bypass, c_stall);
    checks += 7;
    if (c_mulj == 0)    begin failures++; $display("st_mulj never happened"); end
    if (c_csa == 0)     begin failures++; $display("st_csa never happened"); end
    if (c_mul_pre == 0) begin failures++; $display("pre-link multiplication never happened"); end
    if (c_mul_nxt == 0) begin failures++; $display("nxt-link multiplication never happened"); end
    if (c_trivial == 0) begin failures++; $display("trivial twiddle skip never happened"); end
    if (c_bypass == 0)  begin failures++; $display("bypass never happened"); end
    if (c_stall == 0)   begin failures++; $display("stall never happened"); end
    checks++;
    if (c_nontriv != MULS) begin
      failures++; $display("N=%0d: %0d nontrivial multiplications per frame, want %0d", N, c_nontriv, MULS);
    end
    $display("N=%0d: %0d checks, %0d failures, %0d multiplications per frame", N, checks, failures, c_nontriv);
    done = 1'b1;
  end

endmodule
