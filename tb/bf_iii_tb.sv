// bf_iii_tb: checks the carry-save butterfly with its feedback buffer
// (depth 4). Each block of 8 samples gets a random tag: st_normal, st_mulj or
// st_csa. Every input sample is handed over as a random pair of rows (s, c)
// whose sum modulo 2^(WIN+1) is the sample, as the shared multiplier would
// deliver it. The testbench checks the differences and sums exactly against
// its own integer arithmetic, and the outgoing tags.
module bf_iii_tb;
  import srsdf_pkg::*;
  localparam int WIN = 9;
  localparam int WO  = WIN + 1;
  localparam int D   = 4;
  localparam int NB  = 40;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bypass;
  logic signed [WIN-1:0] in_re, in_im;
  logic [WO-1:0] re_s, re_c, im_s, im_c;
  bf_mode_e in_mode, out_mode;
  logic [2*WO-1:0] fb_wr, fb_rd;
  logic signed [WO-1:0] out_re, out_im;
  always #5 clk = ~clk;

  bf_iii #(.WIN(WIN)) dut (.clk, .rst_n, .en, .bypass, .in_re_s(re_s), .in_re_c(re_c), .in_im_s(im_s), .in_im_c(im_c), .in_mode(in_mode),
    .fb_wr, .fb_rd, .out_re, .out_im, .out_mode);
  fb_memory #(.DEPTH(D), .WIDTH(2 * WO)) u_fb (.clk, .rst_n, .en, .wr_data(fb_wr), .rd_data(fb_rd));

  int checks = 0, failures = 0;
  int xr [NB][2*D], xi [NB][2*D];
  bf_mode_e bm [NB];
  int n_mulj = 0, n_csa = 0;

  function automatic bf_mode_e pick_mode();
    int r = $urandom_range(2);
    return (r == 0) ? ST_NORMAL : (r == 1) ? ST_MULJ : ST_CSA;
  endfunction

  // operand after the optional -j
  function automatic void opnd(int b, int i, output int r, output int im);
    if (bm[b] == ST_MULJ) begin r = xi[b][i]; im = -xr[b][i]; end
    else begin r = xr[b][i]; im = xi[b][i]; end
  endfunction

  function automatic bf_mode_e nm(bf_mode_e m, logic byp);
    if (m == ST_MULJ) return ST_CSA;
    return byp ? ST_NORMAL : ST_MULJ;
  endfunction

  initial begin
    int er, ei, br, bi;
    bf_mode_e em;
    logic have;
    for (int b = 0; b < NB; b++) begin
      bm[b] = pick_mode();
      if (bm[b] == ST_MULJ) n_mulj++;
      if (bm[b] == ST_CSA) n_csa++;
      for (int i = 0; i < 2 * D; i++) begin
        xr[b][i] = int'($urandom_range(2 ** WIN - 1)) - 2 ** (WIN - 1);
        xi[b][i] = int'($urandom_range(2 ** WIN - 1)) - 2 ** (WIN - 1);
      end
    end
    bypass = 1'b1; in_re = '0; in_im = '0; in_mode = ST_NORMAL;
    {re_s, re_c, im_s, im_c} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NB * 2 * D; t++) begin
      int b, p;
      b = t / (2 * D);
      p = t % (2 * D);
      @(negedge clk);
      en = 1'b1;
      bypass = (p < D);
      in_re = WIN'(xr[b][p]);
      in_im = WIN'(xi[b][p]);
      in_mode = bm[b];
      re_s = WO'($urandom);
      re_c = WO'(xr[b][p]) - re_s;
      im_s = WO'($urandom);
      im_c = WO'(xi[b][p]) - im_s;
      have = 1'b1;
      if (p >= D) begin
        opnd(b, p, br, bi);
        er = xr[b][p - D] - br;
        ei = xi[b][p - D] - bi;
        em = nm(bm[b], 1'b0);
      end else if (b > 0) begin
        opnd(b - 1, p + D, br, bi);
        er = xr[b - 1][p] + br;
        ei = xi[b - 1][p] + bi;
        em = nm(bm[b - 1], 1'b1);
      end else have = 1'b0;
      @(posedge clk);
      #1;
      if (have) begin
        checks++;
        if (out_re != WO'(er) || out_im != WO'(ei) || out_mode != em) begin
          failures++;
          if (failures < 10)
            $display("block %0d pos %0d: got (%0d,%0d,%s) want (%0d,%0d,%s)",
                     b, p, out_re, out_im, out_mode.name(), er, ei, em.name());
        end
      end
    end
    $display("blocks %0d, st_mulj %0d, st_csa %0d", NB, n_mulj, n_csa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 2 * D * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
