// shared_cmul: complex multiplier shared by two successive links, with
// carry-save output (first half of the delay-balanced multiplier).
//
// pre_* is the link from butterfly stage k to stage k+1, nxt_* the link from
// stage k+1 to stage k+2. Under the BIBR schedule at most one of them carries
// st_csa data (the outputs of a "-j" butterfly, which need a twiddle factor)
// in any cycle. That one is multiplied by (w_re, w_im) unless mul_mode marks
// the twiddle as trivial; every other word passes through unchanged
// (bp_pre_in / bp_nxt_in). Both links leave through this module's register,
// so every link has the same one-cycle latency whether multiplied or not.
//
// Each output part, x_re*w_re - x_im*w_im and x_re*w_im + x_im*w_re, is
// formed as one merged partial-product array: the twiddle parts are radix-4
// (modified) Booth recoded, M/2 rows per product, plus one row of Booth
// negation bits per product, M+2 rows in all, reduced by a Wallace tree of
// 3:2 full-adder rows down to a sum row and a carry row. The carry-propagate
// addition is left to the next butterfly (bf_iii). Twiddles have M-1
// fraction bits; the M-1 low bits of each row are dropped (direct
// truncation, so the product may be up to 2 LSB below the exact floor).
// Outputs are one bit wider than the link they belong to (the width of the
// next butterfly's result) and are meaningful modulo 2^width only; bypassed
// words come out as (x, 0).
// Timing: one register stage.
//
// Sharing by two links, Booth recoding, the merged Wallace tree of M+2 rows
// and the carry-save hand-over come from the delay-balanced SRSDF
// architecture; the row layout of the Booth negation bits and the per-row
// truncation are this implementation's.
module shared_cmul
  import srsdf_pkg::*;
#(
  parameter int unsigned WPRE = 14,   // width of the pre link data; nxt is WPRE+1
  parameter int unsigned M    = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [WPRE-1:0] pre_re,
  input  logic signed [WPRE-1:0] pre_im,
  input  bf_mode_e               pre_mode,
  input  logic signed [WPRE:0]   nxt_re,
  input  logic signed [WPRE:0]   nxt_im,
  input  bf_mode_e               nxt_mode,
  input  logic signed [M-1:0]    w_re,
  input  logic signed [M-1:0]    w_im,
  input  logic                   mul_mode,
  // carry-save outputs towards stage k+1 (WPRE+1 bits) and k+2 (WPRE+2 bits)
  output logic [WPRE:0]          pre_re_s, pre_re_c, pre_im_s, pre_im_c,
  output bf_mode_e               pre_mode_o,
  output logic [WPRE+1:0]        nxt_re_s, nxt_re_c, nxt_im_s, nxt_im_c,
  output bf_mode_e               nxt_mode_o
);
  localparam int unsigned WX   = WPRE + 1;        // multiplicand width after the input mux
  localparam int unsigned F    = WX + M + 1;      // partial-product array width
  localparam int unsigned NB   = (M + 1) / 2;     // Booth digits per product
  localparam int unsigned ROWS = 2 * NB + 2;      // merged array height
  localparam int unsigned WO   = WPRE + 2;        // widest output row

  typedef logic [F-1:0] row_t;
  typedef row_t rows_t [ROWS];

  // Booth rows of a*b (negated if neg_prod) into rows[base..base+NB-1], the
  // negation bits into rows[cbase].
  function automatic void booth_rows(input logic signed [WX-1:0] a,
                                     input logic signed [M-1:0] b, input logic neg_prod,
                                     input int base, input int cbase, ref rows_t rows);
    logic [M+1:0] bx;                      // b with b[-1] = 0 appended, sign-extended
    bx = {b[M-1], b, 1'b0};
    rows[cbase] = '0;
    for (int i = 0; i < int'(NB); i++) begin
      logic [2:0] g;
      logic       one, two, neg;
      row_t       mag;
      g   = bx[2*i +: 3];
      one = g[1] ^ g[0];
      two = (g == 3'b011) || (g == 3'b100);
      neg = g[2] ^ neg_prod;
      mag = one ? F'(a) : two ? (F'(a) << 1) : '0;
      rows[base + i] = (neg ? ~mag : mag) << (2 * i);
      rows[cbase]    = rows[cbase] | (row_t'(neg) << (2 * i));
    end
  endfunction

  // Wallace reduction of the array to two rows (sum, carry).
  function automatic void wallace(input rows_t in_rows, output row_t s, output row_t c);
    rows_t cur, nxt;
    int    n, m;
    cur = in_rows;
    n   = ROWS;
    for (int level = 0; level < int'(ROWS); level++) begin
      if (n > 2) begin
        m = 0;
        for (int i = 0; i < int'(ROWS); i++) nxt[i] = '0;
        for (int g = 0; g < int'(ROWS) / 3; g++) begin
          if (3 * g + 2 < n) begin
            nxt[m]     = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
            nxt[m + 1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                          (cur[3*g+1] & cur[3*g+2])) << 1;
            m += 2;
          end
        end
        for (int i = 0; i < int'(ROWS); i++)
          if (i >= 3 * (n / 3) && i < n) begin
            nxt[m] = cur[i];
            m += 1;
          end
        cur = nxt;
        n   = m;
      end
    end
    s = cur[0];
    c = cur[1];
  endfunction

  // a*p + b*q (sub = 0) or a*p - b*q (sub = 1) as sum and carry rows
  function automatic void cs_dot(input logic signed [WX-1:0] a, input logic signed [M-1:0] p,
                                 input logic signed [WX-1:0] b, input logic signed [M-1:0] q,
                                 input logic sub, output row_t s, output row_t c);
    rows_t rows;
    booth_rows(a, p, 1'b0, 0,  2 * NB,     rows);
    booth_rows(b, q, sub,  NB, 2 * NB + 1, rows);
    wallace(rows, s, c);
  endfunction

  logic                   use_nxt, do_mul;
  logic signed [WX-1:0]   x_re, x_im;
  row_t                   rs, rc, is_, ic;
  logic [WO-1:0]          m_re_s, m_re_c, m_im_s, m_im_c;

  always_comb begin
    use_nxt = (nxt_mode == ST_CSA);
    do_mul  = ((pre_mode == ST_CSA) || use_nxt) && !mul_mode;
    x_re    = use_nxt ? nxt_re : WX'(pre_re);
    x_im    = use_nxt ? nxt_im : WX'(pre_im);
    cs_dot(x_re, w_re, x_im, w_im, 1'b1, rs, rc);
    cs_dot(x_re, w_im, x_im, w_re, 1'b0, is_, ic);
    m_re_s = rs[M-1 +: WO];
    m_re_c = rc[M-1 +: WO];
    m_im_s = is_[M-1 +: WO];
    m_im_c = ic[M-1 +: WO];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {pre_re_s, pre_re_c, pre_im_s, pre_im_c} <= '0;
      {nxt_re_s, nxt_re_c, nxt_im_s, nxt_im_c} <= '0;
      pre_mode_o <= ST_NORMAL;
      nxt_mode_o <= ST_NORMAL;
    end else if (en) begin
      pre_mode_o <= pre_mode;
      nxt_mode_o <= nxt_mode;
      if (do_mul && !use_nxt) begin
        pre_re_s <= m_re_s[WPRE:0];  pre_re_c <= m_re_c[WPRE:0];
        pre_im_s <= m_im_s[WPRE:0];  pre_im_c <= m_im_c[WPRE:0];
      end else begin                 // bp_pre_in
        pre_re_s <= (WPRE+1)'(pre_re);  pre_re_c <= '0;
        pre_im_s <= (WPRE+1)'(pre_im);  pre_im_c <= '0;
      end
      if (do_mul && use_nxt) begin
        nxt_re_s <= m_re_s;  nxt_re_c <= m_re_c;
        nxt_im_s <= m_im_s;  nxt_im_c <= m_im_c;
      end else begin                 // bp_nxt_in
        nxt_re_s <= WO'(nxt_re);  nxt_re_c <= '0;
        nxt_im_s <= WO'(nxt_im);  nxt_im_c <= '0;
      end
    end
  end

endmodule
