// twiddle_rom: twiddle-factor table ("W") of one shared complex multiplier.
//
// The multiplier serves link PRE (the output of butterfly stage PRE) and, if
// HAS_NXT, link PRE+1. Only data tagged st_csa - the two outputs of a "-j"
// butterfly - is multiplied. For link k such data belongs to an odd block of
// a sub-transform of length N/2^(k-1); at position n of the block the
// difference output (the A[4k+3] branch) needs W^(3n) and the sum output (the
// A[4k+1] branch) needs W^n of that length, i.e. W_N^(3n*2^(k-1)) and
// W_N^(n*2^(k-1)). n and the phase (difference or sum) follow from the global
// count: the data on link k left stage k one cycle ago, when that stage's
// count was cnt-1-2k. mul_mode is 1 when the multiplication is trivial
// (exponent 0, W = 1) and is skipped.
// The table holds W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N), e = 0..N-1, as
// M-bit two's complement with M-1 fraction bits, rounded to nearest and
// clipped to (2^(M-1)-1)/2^(M-1); it is computed at elaboration time.
// If both links carry st_csa in the same cycle, which the BIBR schedule rules
// out once real data fills the pipeline, the previous link wins.
// Timing: purely combinational.
//
// The table and the mul_mode flag belong to the SRSDF architecture; the
// exponent formula is derived from the split-radix decomposition, and the
// table size, rounding and coding are this implementation's.
module twiddle_rom
  import srsdf_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned M       = 12,
  parameter int unsigned PRE     = 1,
  parameter bit          HAS_NXT = 1'b1
) (
  input  logic [$clog2(N)-1:0]  cnt,
  input  bf_mode_e              pre_mode,
  input  bf_mode_e              nxt_mode,
  output logic signed [M-1:0]   w_re,
  output logic signed [M-1:0]   w_im,
  output logic                  mul_mode    // 1: trivial, skip the multiplication
);
  localparam int unsigned LOGN = $clog2(N);
  typedef logic [2*M-1:0] rom_t [N];

  function automatic rom_t make_rom();
    rom_t r;
    for (int e = 0; e < int'(N); e++) begin
      real    ang;
      longint c, s, lim;
      lim = (64'sd1 << (M - 1)) - 1;
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      c = longint'($floor($cos(ang) * real'(lim + 1) + 0.5));
      s = longint'($floor(-$sin(ang) * real'(lim + 1) + 0.5));
      if (c > lim) c = lim;
      if (s > lim) s = lim;
      r[e] = {c[M-1:0], s[M-1:0]};
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  // exponent for the data now on link k
  function automatic logic [LOGN-1:0] link_exp(logic [LOGN-1:0] count, int unsigned k);
    logic [LOGN-1:0] pos, n, e;
    int unsigned     dbits;
    dbits = LOGN - 1 - k;                       // log2 of the block half-length
    pos   = count - LOGN'(1 + 2 * k);
    n     = pos & LOGN'((1 << dbits) - 1);
    e     = pos[dbits] ? LOGN'(3 * n) : n;      // difference: W^3n, sum: W^n
    return LOGN'(e << (k - 1));
  endfunction

  logic            sel_nxt;                   // the multiplication is for link PRE+1
  logic [LOGN-1:0] exp_sel;
  logic [2*M-1:0]  word;

  always_comb begin
    sel_nxt = HAS_NXT && (pre_mode != ST_CSA) && (nxt_mode == ST_CSA);
    exp_sel = sel_nxt ? link_exp(cnt, PRE + 1) : link_exp(cnt, PRE);
    word    = ROM[exp_sel];
    w_re    = word[2*M-1:M];
    w_im    = word[M-1:0];
    mul_mode = (exp_sel == '0);
  end

endmodule
