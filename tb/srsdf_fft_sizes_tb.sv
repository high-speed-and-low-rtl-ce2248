// srsdf_fft_sizes_tb: runs the end-to-end check at five transform sizes in
// parallel: N = 16 (the smallest pipeline with two links per multiplier),
// 32 and 128 (odd number of radix-2 stages, not a power of 4), 256 and 1024
// (FFT lengths of OFDM systems). Each size also checks that the pipeline
// performs exactly the split-radix number of nontrivial multiplications per
// frame: 8, 26, 186, 456 and 2504.
module srsdf_fft_sizes_tb;
  localparam int NS = 5;
  logic [NS-1:0] done;
  int chk [NS], fail [NS];

  srsdf_fft_run #(.N(16),   .NF(6), .MULS(8)) u16   (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  srsdf_fft_run #(.N(32),   .NF(6), .MULS(26)) u32   (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  srsdf_fft_run #(.N(128),  .NF(6), .MULS(186)) u128  (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  srsdf_fft_run #(.N(256),  .NF(5), .MULS(456)) u256  (.done(done[3]), .checks(chk[3]), .failures(fail[3]));
  srsdf_fft_run #(.N(1024), .NF(5), .MULS(2504)) u1024 (.done(done[4]), .checks(chk[4]), .failures(fail[4]));

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
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NS; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
