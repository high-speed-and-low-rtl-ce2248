// twiddle_rom_tb: checks the twiddle table of the multiplier that serves
// links 1 and 2 of a 64-point pipeline. For every count value and each link
// that may ask for a multiplication, the testbench derives the block position
// of the data on that link (it left stage k at count-1-2k), decides whether it
// is the difference (A[4k+3] branch, W^3n) or the sum (A[4k+1] branch, W^n)
// of a sub-transform of length N/2^(k-1), computes the twiddle in double
// precision, rounds it to 12 bits and compares, together with the mul_mode
// flag for the trivial W = 1.
module twiddle_rom_tb;
  import srsdf_pkg::*;
  localparam int N = 64, M = 12, LOGN = 6, PRE = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LOGN-1:0] cnt;
  bf_mode_e pre_mode, nxt_mode;
  logic signed [M-1:0] w_re, w_im;
  logic mul_mode;
  always #5 clk = ~clk;

  twiddle_rom #(.N(N), .M(M), .PRE(PRE), .HAS_NXT(1'b1)) dut (.cnt, .pre_mode, .nxt_mode, .w_re, .w_im, .mul_mode);

  int checks = 0, failures = 0, trivial = 0;

  function automatic int q(real v);
    int r = int'($floor(v * 2048.0 + 0.5));
    return (r > 2047) ? 2047 : r;
  endfunction

  initial begin
    pre_mode = ST_NORMAL; nxt_mode = ST_NORMAL; cnt = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int link = PRE; link <= PRE + 1; link++)
      for (int c = 0; c < N; c++) begin
        int pos, half, n, len, e, wr, wi;
        real ang;
        pos  = ((c - 1 - 2 * link) % N + N) % N;
        half = N >> (link + 1);                  // block half-length on this link
        n    = pos % half;
        len  = N >> (link - 1);                  // sub-transform the twiddle belongs to
        e    = ((pos / half) % 2 == 1) ? 3 * n : n;
        ang  = 2.0 * 3.14159265358979323846 * real'(e) / real'(len);
        wr   = q($cos(ang));
        wi   = q(-$sin(ang));
        @(negedge clk);
        cnt      = LOGN'(c);
        pre_mode = (link == PRE) ? ST_CSA : ST_NORMAL;
        nxt_mode = (link == PRE) ? ST_NORMAL : ST_CSA;
        #1;
        checks++;
        if (mul_mode != (e == 0)) begin
          failures++; $display("link %0d cnt %0d: mul_mode %b for exponent %0d", link, c, mul_mode, e);
        end
        if (e == 0) trivial++;
        else begin
          checks++;
          if (w_re != M'(wr) || w_im != M'(wi)) begin
            failures++;
            if (failures < 10)
              $display("link %0d cnt %0d: W (%0d,%0d) want (%0d,%0d) for W_%0d^%0d",
                       link, c, w_re, w_im, wr, wi, len, e);
          end
        end
      end
    checks++;
    if (trivial == 0) begin failures++; $display("no trivial twiddle seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
