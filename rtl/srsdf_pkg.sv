// srsdf_pkg: types and helpers shared by the split-radix SDF FFT pipeline.
//
// bf_mode is the 2-bit local control tag that travels with the data from one
// butterfly stage to the next. Its encoding and the state transition table
// (next tag as a function of the current tag and of bf_bypass) follow the
// split-radix mapping: the difference half of an ordinary radix-2 butterfly
// becomes an odd block that needs a "-j" butterfly next (st_mulj); both
// halves of a "-j" butterfly need a twiddle multiplication and arrive at the
// following stage in carry-save form (st_csa); a carry-save block is an
// ordinary block once its final addition is done.
//
// The three tags, their codes and the transition table are those of the
// SRSDF architecture; the helper functions are this implementation's.
package srsdf_pkg;

  typedef enum logic [1:0] {
    ST_NORMAL = 2'b00,
    ST_MULJ   = 2'b01,
    ST_CSA    = 2'b11
  } bf_mode_e;

  // Tag of the data a butterfly emits. bypass=1: the stored sums leave the
  // stage; bypass=0: the differences leave the stage.
  function automatic bf_mode_e next_mode(bf_mode_e cur, logic bypass);
    unique case (cur)
      ST_MULJ: next_mode = ST_CSA;
      default: next_mode = bypass ? ST_NORMAL : ST_MULJ;
    endcase
  endfunction

  // Bit-reversal of the low `bits` bits of v.
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

endpackage
