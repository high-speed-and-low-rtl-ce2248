// srsdf_fft: delay-balanced split-radix single-path delay-feedback FFT
// pipeline (SRSDF), N points, one complex sample in and one complex result
// out per enabled clock cycle.
//
// Structure (LOGN = log2 N radix-2 stages, stage k has a feedback buffer of
// N/2^(k+1) words, N-1 words in all):
//   stage 0          bf_i   - plain radix-2 butterfly
//   stage 1          bf_ii  - radix-2 butterfly with optional -j
//   stages 2..LOGN-1 bf_iii - butterfly with carry-save input
// The split-radix algorithm is carried by the bf_mode tag that travels with
// the data: the differences of an ordinary block become an odd block that
// needs a "-j" butterfly in the next stage; the two outputs of that butterfly
// need twiddle factors W^n and W^3n and are multiplied on the link to the
// stage after. Links 1..LOGN-2 can carry such data; they are served pairwise
// by ceil((LOGN-2)/2) shared complex multipliers (log4(N)-1 for even LOGN),
// each with its own twiddle table. The multiplier's final addition is merged
// into the next butterfly (carry-save hand-over), so a multiplier stage and a
// butterfly stage have about the same logic depth. Links 0 and LOGN-1 never
// need a multiplier and get a plain register, so every stage takes exactly
// two cycles.
// Every butterfly sends its difference onward first and parks its sum
// (bit-inverse and bit-reverse, BIBR, schedule). Output position p of a
// frame holds frequency bin k = bitrev(~p) (LOGN bits); out_k gives it.
//
// Interface: in_valid is a global clock enable - the whole pipeline, counter
// included, moves only in cycles where it is high, so a frame is N enabled
// cycles of input. Inputs are L-bit two's complement; the word grows by one
// bit per stage and results are L+LOGN bits, scaled by 1 (no scaling: the
// result is the plain DFT sum, minus truncation error of the multipliers).
// The complex input magnitude must stay below 2^(L-1) to rule out overflow
// (a twiddle rotation can raise one part by sqrt(2)).
// Latency: the first result of a frame appears 2*LOGN+N-1 enabled cycles
// after its first sample was presented (N + 2*log2 N counting both cycles);
// afterwards one frame completes every N cycles. out_valid is low until the
// pipeline holds a full frame.
//
// The stage types, the shared multipliers, the carry-save hand-over, the
// tags, the BIBR order, one-bit growth per stage and the N + 2*log2 N
// latency follow the SRSDF architecture. The multiplier-to-link assignment,
// the plain registers on links 0 and log2N-1, the global enable, the reset
// and the out_k/out_first labels are this implementation's choices.
module srsdf_fft
  import srsdf_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 12,
  parameter int unsigned M = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [L-1:0]           in_re,
  input  logic signed [L-1:0]           in_im,
  output logic                          out_valid,
  output logic                          out_first,   // first result of a frame
  output logic [$clog2(N)-1:0]          out_k,       // frequency bin of this result
  output logic signed [L+$clog2(N)-1:0] out_re,
  output logic signed [L+$clog2(N)-1:0] out_im
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned WMAX = L + LOGN + 1;
  localparam int unsigned NMUL = (LOGN - 1) / 2;     // ceil((LOGN-2)/2)
  localparam int unsigned LAT  = N - 1 + 2 * LOGN;   // first-result delay, cycles

  // N must be a power of two with at least three stages (one multiplier link)
  if (N != (1 << LOGN) || LOGN < 3) begin : g_bad_n
    $error("srsdf_fft: N must be a power of two, at least 8");
  end

  logic en;
  assign en = in_valid;

  // ---- global control ----------------------------------------------------
  logic [LOGN-1:0] cnt, bypass;

  bf_counter #(.LOGN(LOGN)) u_counter (
    .clk, .rst_n, .en, .cnt, .bypass
  );

  // ---- per-stage signals, sign-extended to WMAX bits -------------------
  // bo_*: butterfly output register of stage k (link k before its register)
  // ln_*: link k after its register, carry-save rows (c = 0 if plain)
  logic [WMAX-1:0] bo_re [LOGN], bo_im [LOGN];
  bf_mode_e        bo_mode [LOGN];
  logic [WMAX-1:0] ln_re_s [LOGN], ln_re_c [LOGN], ln_im_s [LOGN], ln_im_c [LOGN];
  bf_mode_e        ln_mode [LOGN];

  for (genvar k = 0; k < int'(LOGN); k++) begin : g_st
    localparam int unsigned WI = L + k;
    localparam int unsigned WO = L + k + 1;

    logic [2*WO-1:0]        fb_wr, fb_rd;
    logic signed [WO-1:0]   o_re, o_im;
    bf_mode_e               o_mode;

    fb_memory #(.DEPTH(N >> (k + 1)), .WIDTH(2 * WO)) u_fb (
      .clk, .rst_n, .en, .wr_data(fb_wr), .rd_data(fb_rd)
    );

    if (k == 0) begin : g_bf
      bf_i #(.WIN(WI)) u_bf (
        .clk, .rst_n, .en, .bypass(bypass[k]),
        .in_re, .in_im,
        .fb_wr, .fb_rd, .out_re(o_re), .out_im(o_im), .out_mode(o_mode)
      );
    end else if (k == 1) begin : g_bf
      bf_ii #(.WIN(WI)) u_bf (
        .clk, .rst_n, .en, .bypass(bypass[k]),
        .in_re(ln_re_s[k-1][WI-1:0]), .in_im(ln_im_s[k-1][WI-1:0]), .in_mode(ln_mode[k-1]),
        .fb_wr, .fb_rd, .out_re(o_re), .out_im(o_im), .out_mode(o_mode)
      );
    end else begin : g_bf
      bf_iii #(.WIN(WI)) u_bf (
        .clk, .rst_n, .en, .bypass(bypass[k]),
        .in_re_s(ln_re_s[k-1][WI:0]), .in_re_c(ln_re_c[k-1][WI:0]),
        .in_im_s(ln_im_s[k-1][WI:0]), .in_im_c(ln_im_c[k-1][WI:0]),
        .in_mode(ln_mode[k-1]),
        .fb_wr, .fb_rd, .out_re(o_re), .out_im(o_im), .out_mode(o_mode)
      );
    end

    assign bo_re[k]   = WMAX'(o_re);
    assign bo_im[k]   = WMAX'(o_im);
    assign bo_mode[k] = o_mode;

    // links that no multiplier serves: a plain pipeline register
    if (k == 0 || k == int'(LOGN) - 1) begin : g_plain
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          ln_re_s[k] <= '0;
          ln_im_s[k] <= '0;
          ln_mode[k] <= ST_NORMAL;
        end else if (en) begin
          ln_re_s[k] <= bo_re[k];
          ln_im_s[k] <= bo_im[k];
          ln_mode[k] <= bo_mode[k];
        end
      end
      assign ln_re_c[k] = '0;
      assign ln_im_c[k] = '0;
    end
  end

  // ---- shared multipliers: multiplier j serves links 2j+1 and 2j+2 -------
  for (genvar j = 0; j < int'(NMUL); j++) begin : g_mul
    localparam int unsigned P       = 2 * j + 1;
    localparam bit          HAS_NXT = (P + 1 <= LOGN - 2);
    localparam int unsigned Q       = HAS_NXT ? P + 1 : P;   // nxt link index
    localparam int unsigned WP      = L + P + 1;              // pre link width

    logic signed [M-1:0] w_re, w_im;
    logic                mul_mode;
    bf_mode_e            nxt_mode_in;
    logic [WP:0]         p_re_s, p_re_c, p_im_s, p_im_c;
    logic [WP+1:0]       n_re_s, n_re_c, n_im_s, n_im_c;
    bf_mode_e            p_mode, n_mode;

    assign nxt_mode_in = HAS_NXT ? bo_mode[Q] : ST_NORMAL;

    twiddle_rom #(.N(N), .M(M), .PRE(P), .HAS_NXT(HAS_NXT)) u_w (
      .cnt,
      .pre_mode(bo_mode[P]), .nxt_mode(nxt_mode_in),
      .w_re, .w_im, .mul_mode
    );

    shared_cmul #(.WPRE(WP), .M(M)) u_mul (
      .clk, .rst_n, .en,
      .pre_re(bo_re[P][WP-1:0]), .pre_im(bo_im[P][WP-1:0]), .pre_mode(bo_mode[P]),
      .nxt_re(HAS_NXT ? bo_re[Q][WP:0] : '0), .nxt_im(HAS_NXT ? bo_im[Q][WP:0] : '0),
      .nxt_mode(nxt_mode_in),
      .w_re, .w_im, .mul_mode,
      .pre_re_s(p_re_s), .pre_re_c(p_re_c), .pre_im_s(p_im_s), .pre_im_c(p_im_c),
      .pre_mode_o(p_mode),
      .nxt_re_s(n_re_s), .nxt_re_c(n_re_c), .nxt_im_s(n_im_s), .nxt_im_c(n_im_c),
      .nxt_mode_o(n_mode)
    );

    // BIBR: the two links never need the multiplier at once. Right after
    // reset the not-yet-filled stages may show it on meaningless data, so
    // the rule is checked once the pipeline is full.
    a_no_conflict: assert property (@(posedge clk)
        out_valid |-> !(bo_mode[P] == ST_CSA && nxt_mode_in == ST_CSA))
      else $error("srsdf_fft: both links of multiplier %0d need it in the same cycle", j);

    assign ln_re_s[P] = WMAX'(p_re_s);
    assign ln_re_c[P] = WMAX'(p_re_c);
    assign ln_im_s[P] = WMAX'(p_im_s);
    assign ln_im_c[P] = WMAX'(p_im_c);
    assign ln_mode[P] = p_mode;
    if (HAS_NXT) begin : g_nxt
      assign ln_re_s[Q] = WMAX'(n_re_s);
      assign ln_re_c[Q] = WMAX'(n_re_c);
      assign ln_im_s[Q] = WMAX'(n_im_s);
      assign ln_im_c[Q] = WMAX'(n_im_c);
      assign ln_mode[Q] = n_mode;
    end
  end

  // ---- output ----------------------------------------------------------
  logic [$clog2(LAT+1)-1:0] fill;
  logic [LOGN-1:0]          out_pos, inv_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       fill <= '0;
    else if (en && fill != LAT[$bits(fill)-1:0]) fill <= fill + 1'b1;
  end

  assign out_valid = en && (fill == LAT[$bits(fill)-1:0]);
  assign out_pos   = cnt - LOGN'(LAT);
  assign out_first = out_valid && (out_pos == '0);
  assign inv_pos   = ~out_pos;
  assign out_k     = LOGN'(bitrev(int'(inv_pos), LOGN));
  assign out_re    = ln_re_s[LOGN-1][L+LOGN-1:0];
  assign out_im    = ln_im_s[LOGN-1][L+LOGN-1:0];

endmodule
