// bf_iii: butterfly with a merged carry-save final addition (BF_III).
//
// In the delay-balanced pipeline the shared complex multiplier stops after its
// partial-product tree and hands on two rows (sum row s, carry row c) per
// real/imaginary part; the carry-propagate addition that would end the
// multiplier is done here instead, inside the butterfly's own adders:
//   bypass = 1: the input x = s + c is resolved by the butterfly's adder to
//               two's complement and parked in the feedback buffer, while the
//               stored sum of the previous block leaves the stage;
//   bypass = 0: the parked word a (two's complement) and the incoming rows
//               (s, c) meet in one row of full adders (a 3:2 carry-save adder)
//               whose two outputs feed the butterfly adder. Subtraction uses
//               a - s - c = a + ~s + ~c + 2: the two +1s go into the free
//               carry-row LSB and into the adder carry-in.
// Operation per incoming bf_mode tag (BIBR schedule as in bf_i/bf_ii):
//   st_normal, st_csa: a +/- x;  st_mulj: a +/- (-j)x, with -j as a swap of
//   the real/imaginary rows and a sign change, both absorbed by the adder row.
// The rows are only meaningful modulo 2^(WIN+1): every sum here is kept at
// WIN+1 bits, which holds the true result, so the wrap-around never shows.
// Data that bypassed the multiplier arrives as (x, 0).
// Timing: registered output, one cycle from input to output.
//
// Converting carry-save input on the way into the buffer and the single
// full-adder row before the butterfly adder come from the delay-balanced
// SRSDF architecture; the +2 trick for subtraction and the row width are
// this implementation's.
module bf_iii
  import srsdf_pkg::*;
#(
  parameter int unsigned WIN = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  bypass,
  // carry-save input rows, WIN+1 bits each
  input  logic [WIN:0]          in_re_s,
  input  logic [WIN:0]          in_re_c,
  input  logic [WIN:0]          in_im_s,
  input  logic [WIN:0]          in_im_c,
  input  bf_mode_e              in_mode,
  output logic [2*WIN+1:0]      fb_wr,
  input  logic [2*WIN+1:0]      fb_rd,
  output logic signed [WIN:0]   out_re,
  output logic signed [WIN:0]   out_im,
  output bf_mode_e              out_mode
);
  localparam int unsigned WOUT = WIN + 1;

  // a + s + c (neg = 0) or a - s - c (neg = 1) through one full-adder row
  // followed by the carry-propagate adder.
  function automatic logic [WOUT-1:0] csa_add(logic [WOUT-1:0] a, logic [WOUT-1:0] s,
                                              logic [WOUT-1:0] c, logic neg);
    logic [WOUT-1:0] x, y, ps, pc;
    x  = neg ? ~s : s;
    y  = neg ? ~c : c;
    ps = a ^ x ^ y;
    pc = {((a[WOUT-2:0] & x[WOUT-2:0]) | (a[WOUT-2:0] & y[WOUT-2:0]) |
           (x[WOUT-2:0] & y[WOUT-2:0])), neg};
    return ps + pc + WOUT'(neg);
  endfunction

  logic [WOUT-1:0] a_re, a_im;
  logic [WOUT-1:0] br_s, br_c, bi_s, bi_c;   // rows of the real / imaginary operand
  logic            br_neg, bi_neg;           // operand enters negated
  logic [WOUT-1:0] sum_re, sum_im, dif_re, dif_im;
  logic [WOUT-1:0] nxt_re, nxt_im;
  bf_mode_e        held_mode;

  assign a_re = fb_rd[2*WOUT-1:WOUT];
  assign a_im = fb_rd[WOUT-1:0];

  always_comb begin
    if (in_mode == ST_MULJ) begin
      // -j * (re + j im) = im - j re
      br_s = in_im_s;  br_c = in_im_c;  br_neg = 1'b0;
      bi_s = in_re_s;  bi_c = in_re_c;  bi_neg = 1'b1;
    end else begin
      br_s = in_re_s;  br_c = in_re_c;  br_neg = 1'b0;
      bi_s = in_im_s;  bi_c = in_im_c;  bi_neg = 1'b0;
    end
    sum_re = csa_add(a_re, br_s, br_c, br_neg);
    sum_im = csa_add(a_im, bi_s, bi_c, bi_neg);
    dif_re = csa_add(a_re, br_s, br_c, !br_neg);
    dif_im = csa_add(a_im, bi_s, bi_c, !bi_neg);
    if (bypass) begin
      // carry-save to two's complement on the way into the buffer
      fb_wr  = {in_re_s + in_re_c, in_im_s + in_im_c};
      nxt_re = a_re;
      nxt_im = a_im;
    end else begin
      fb_wr  = {sum_re, sum_im};
      nxt_re = dif_re;
      nxt_im = dif_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re    <= '0;
      out_im    <= '0;
      out_mode  <= ST_NORMAL;
      held_mode <= ST_NORMAL;
    end else if (en) begin
      out_re   <= nxt_re;
      out_im   <= nxt_im;
      out_mode <= bypass ? next_mode(held_mode, 1'b1) : next_mode(in_mode, 1'b0);
      if (!bypass) held_mode <= in_mode;
    end
  end

endmodule
