// bf_i: first-stage radix-2 butterfly of the split-radix SDF pipeline (BF_I).
//
// Works in two phases chosen by bf_bypass, with a feedback buffer of N/2 words
// outside this module (fb_wr goes to it, fb_rd comes back DEPTH cycles later):
//   bypass = 1: the incoming sample x[n] is written to the buffer, and the sum
//               stored during the previous compute phase leaves the stage;
//   bypass = 0: x[n] comes back from the buffer, x[n+N/2] is on the input,
//               the sum x[n]+x[n+N/2] goes into the buffer and the
//               difference x[n]-x[n+N/2] leaves the stage at once.
// Sending the difference first and parking the sum is the bit-inverse /
// bit-reverse (BIBR) schedule, which keeps two successive links from needing
// the shared multiplier in the same cycle. The first stage only ever sees
// ordinary (st_normal) data, so it has no -j path and no mode input; it tags
// its differences st_mulj and its sums st_normal. The upper bit of out_mode is
// therefore always 0; the port keeps the full two-bit tag type so that every
// stage hands the same kind of tag to the next.
// Word growth: WIN-bit input, WIN+1-bit output, no overflow possible.
// Timing: the result is registered, one cycle from input to output.
//
// The two phases and the BIBR order come from the SRSDF architecture; the
// output register and the asynchronous reset are this implementation's.
module bf_i
  import srsdf_pkg::*;
#(
  parameter int unsigned WIN = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  bypass,
  input  logic signed [WIN-1:0] in_re,
  input  logic signed [WIN-1:0] in_im,
  // feedback buffer, {re, im}
  output logic [2*WIN+1:0]      fb_wr,
  input  logic [2*WIN+1:0]      fb_rd,
  output logic signed [WIN:0]   out_re,
  output logic signed [WIN:0]   out_im,
  output bf_mode_e              out_mode
);
  localparam int unsigned WOUT = WIN + 1;

  logic signed [WOUT-1:0] a_re, a_im, b_re, b_im;
  logic signed [WOUT-1:0] nxt_re, nxt_im;

  assign a_re = fb_rd[2*WOUT-1:WOUT];
  assign a_im = fb_rd[WOUT-1:0];
  assign b_re = WOUT'(in_re);
  assign b_im = WOUT'(in_im);

  always_comb begin
    if (bypass) begin
      fb_wr  = {b_re, b_im};
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
      out_re   <= '0;
      out_im   <= '0;
      out_mode <= ST_NORMAL;
    end else if (en) begin
      out_re   <= nxt_re;
      out_im   <= nxt_im;
      out_mode <= next_mode(ST_NORMAL, bypass);
    end
  end

endmodule
