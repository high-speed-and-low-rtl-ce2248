// bf_ii: radix-2 butterfly with an optional "-j" on its input (BF_II).
//
// Same two-phase delay-feedback operation and BIBR schedule as bf_i (bypass:
// park the input, emit the stored sum; compute: emit the difference, park the
// sum). The incoming bf_mode tag selects the operation of the compute phase:
//   st_normal: x[n] +/- x[n+D]                       (radix-2 step, eq. 4/5)
//   st_mulj  : m[n] +/- (-j)*m[n+D]                  (odd split, eq. 10/11)
// "-j" costs no multiplier: (re, im) * -j = (im, -re). The tag of the block
// being combined is kept so that its sums, which leave one phase later, carry
// the right tag; the output tag follows the bf_mode transition table.
// st_csa input is not accepted here (an assertion checks it); that is bf_iii.
// Word growth: WIN-bit input, WIN+1-bit output.
// Timing: registered output, one cycle from input to output.
//
// The -j by swap-and-negate and the tag table come from the SRSDF
// architecture; holding the tag of the combined block in a register for the
// sum phase is this implementation's way of keeping tag and data together.
module bf_ii
  import srsdf_pkg::*;
#(
  parameter int unsigned WIN = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  bypass,
  input  logic signed [WIN-1:0] in_re,
  input  logic signed [WIN-1:0] in_im,
  input  bf_mode_e              in_mode,
  output logic [2*WIN+1:0]      fb_wr,
  input  logic [2*WIN+1:0]      fb_rd,
  output logic signed [WIN:0]   out_re,
  output logic signed [WIN:0]   out_im,
  output bf_mode_e              out_mode
);
  localparam int unsigned WOUT = WIN + 1;

  logic signed [WOUT-1:0] a_re, a_im, b_re, b_im;
  logic signed [WOUT-1:0] nxt_re, nxt_im;
  bf_mode_e               held_mode;

  assign a_re = fb_rd[2*WOUT-1:WOUT];
  assign a_im = fb_rd[WOUT-1:0];

  always_comb begin
    // -j * (re + j im) = im - j re
    if (in_mode == ST_MULJ) begin
      b_re = WOUT'(in_im);
      b_im = -WOUT'(in_re);
    end else begin
      b_re = WOUT'(in_re);
      b_im = WOUT'(in_im);
    end
    if (bypass) begin
      fb_wr  = {WOUT'(in_re), WOUT'(in_im)};
      nxt_re = a_re;
      nxt_im = a_im;
    end else begin
      fb_wr  = {a_re + b_re, a_im + b_im};
      nxt_re = a_re - b_re;
      nxt_im = a_im - b_im;
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

  a_no_csa: assert property (@(posedge clk) rst_n && en |-> in_mode != ST_CSA)
    else $error("bf_ii: st_csa input is not supported");

endmodule
