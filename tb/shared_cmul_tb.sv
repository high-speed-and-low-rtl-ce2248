// shared_cmul_tb: checks the shared carry-save complex multiplier with a
// 10-bit pre link and an 11-bit nxt link. Each cycle one of four cases is
// drawn: nothing to multiply, pre link tagged st_csa, nxt link tagged st_csa,
// or a multiplication marked trivial by mul_mode. Random data and random
// 12-bit twiddles (including the extremes -2048 and 2047) are used. The
// testbench adds the sum and carry rows modulo the output width and compares
// with floor((x*W)/2^11) computed in integers: the direct truncation of the
// two rows may leave the result one LSB low, nothing else is accepted.
// Bypassed words must come out as (x, 0) exactly, and the tags must pass
// through, all one cycle later.
module shared_cmul_tb;
  import srsdf_pkg::*;
  localparam int WPRE = 10, M = 12;
  localparam int WP = WPRE + 1, WN = WPRE + 2;    // output widths

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [WPRE-1:0] pre_re, pre_im;
  logic signed [WPRE:0]   nxt_re, nxt_im;
  bf_mode_e pre_mode, nxt_mode, pre_mode_o, nxt_mode_o;
  logic signed [M-1:0] w_re, w_im;
  logic mul_mode;
  logic [WP-1:0] pre_re_s, pre_re_c, pre_im_s, pre_im_c;
  logic [WN-1:0] nxt_re_s, nxt_re_c, nxt_im_s, nxt_im_c;
  always #5 clk = ~clk;

  shared_cmul #(.WPRE(WPRE), .M(M)) dut (.*);

  int checks = 0, failures = 0;
  int cnt_case [4] = '{0, 0, 0, 0};

  function automatic longint wrap(longint v, int w);
    longint m = longint'(1) << w;
    return ((v % m) + m) % m;
  endfunction

  function automatic longint fl(longint v);     // floor(v / 2^(M-1))
    return v >>> (M - 1);
  endfunction

  task automatic chk(string what, longint s, longint c, longint want, int w, bit exact);
    longint d;
    d = wrap(s + c - want, w);
    checks++;
    if (!(d == 0 || (!exact && d == (longint'(1) << w) - 1))) begin
      failures++;
      if (failures < 10) $display("%s: rows sum %0d want %0d (mod 2^%0d)", what, wrap(s + c, w), wrap(want, w), w);
    end
  endtask

  initial begin
    pre_re = '0; pre_im = '0; nxt_re = '0; nxt_im = '0;
    pre_mode = ST_NORMAL; nxt_mode = ST_NORMAL; w_re = '0; w_im = '0; mul_mode = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int kase;
      longint pr, pi, nr, ni, wr, wi, er, ei;
      bf_mode_e pm, nm_;
      kase = $urandom_range(3);
      cnt_case[kase]++;
      @(negedge clk);
      en = 1'b1;
      pre_re = WPRE'($urandom); pre_im = WPRE'($urandom);
      nxt_re = (WPRE+1)'($urandom); nxt_im = (WPRE+1)'($urandom);
      case ($urandom_range(7))
        0: w_re = -12'sd2048;
        1: w_re = 12'sd2047;
        default: w_re = M'($urandom);
      endcase
      w_im = (t % 5 == 0) ? -12'sd2048 : M'($urandom);
      pre_mode = (kase == 1 || (kase == 3 && t % 2 == 0)) ? ST_CSA : ((t % 3 == 0) ? ST_MULJ : ST_NORMAL);
      nxt_mode = (kase == 2 || (kase == 3 && t % 2 == 1)) ? ST_CSA : ((t % 3 == 1) ? ST_MULJ : ST_NORMAL);
      mul_mode = (kase == 3);
      pr = pre_re; pi = pre_im; nr = nxt_re; ni = nxt_im; wr = w_re; wi = w_im;
      pm = pre_mode; nm_ = nxt_mode;
      @(posedge clk);
      #1;
      checks++;
      if (pre_mode_o != pm || nxt_mode_o != nm_) begin
        failures++; $display("tags not passed through");
      end
      if (kase == 1) begin
        chk("pre re", pre_re_s, pre_re_c, fl(pr * wr - pi * wi), WP, 0);
        chk("pre im", pre_im_s, pre_im_c, fl(pr * wi + pi * wr), WP, 0);
      end else begin
        chk("pre bypass re", pre_re_s, 0, pr, WP, 1);
        chk("pre bypass im", pre_im_s, 0, pi, WP, 1);
        checks++;
        if (pre_re_c != 0 || pre_im_c != 0) begin failures++; $display("pre bypass carry row not zero"); end
      end
      if (kase == 2) begin
        chk("nxt re", nxt_re_s, nxt_re_c, fl(nr * wr - ni * wi), WN, 0);
        chk("nxt im", nxt_im_s, nxt_im_c, fl(nr * wi + ni * wr), WN, 0);
      end else begin
        chk("nxt bypass re", nxt_re_s, 0, nr, WN, 1);
        chk("nxt bypass im", nxt_im_s, 0, ni, WN, 1);
        checks++;
        if (nxt_re_c != 0 || nxt_im_c != 0) begin failures++; $display("nxt bypass carry row not zero"); end
      end
    end
    $display("cases: none %0d, pre %0d, nxt %0d, trivial %0d", cnt_case[0], cnt_case[1], cnt_case[2], cnt_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
