// srsdf_fft_ofdm_tb: runs the end-to-end check at the long transform lengths
// of OFDM broadcast systems, N = 2048 and N = 8192 (the 2K and 8K modes), in
// parallel. Besides the comparison with a double-precision DFT, each size
// checks that the shared multipliers perform exactly the split-radix number
// of nontrivial multiplications per frame: 5690 and 28218.
module srsdf_fft_ofdm_tb;
  localparam int NS = 2;
  logic [NS-1:0] done;
  int chk [NS], fail [NS];

  srsdf_fft_run #(.N(2048), .NF(4), .MULS(5690))  u2k (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  srsdf_fft_run #(.N(8192), .NF(4), .MULS(28218)) u8k (.done(done[1]), .checks(chk[1]), .failures(fail[1]));

  int checks, failures;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8192 * 12) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NS; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
