// bf_counter: global control counter of the SDF pipeline (bf_counter).
//
// A LOGN-bit counter advances once per enabled cycle, so it gives the
// position of the current input sample inside its N-sample frame. Butterfly
// stage k toggles between its bypass phase and its compute phase every
// N/2^(k+1) samples, so its bf_bypass is bit (LOGN-1-k) of the count,
// inverted (bypass while the bit is 0): stage 0 uses the MSB and changes
// every N/2 cycles, the last stage uses bit 0. Each stage sits two register
// stages (its own output register and the multiplier/link register) behind
// the one before it, so the count seen by stage k is the global count
// minus 2k; that constant offset is subtracted here.
// Timing: cnt is a register; bypass is combinational from it.
//
// One counter bit per stage, MSB for the first stage, is the SRSDF scheme;
// the 2k offset follows from this implementation's register placement.
module bf_counter #(
  parameter int unsigned LOGN = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [LOGN-1:0] cnt,
  output logic [LOGN-1:0] bypass    // bypass[k] drives butterfly stage k
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= cnt + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < int'(LOGN); k++) begin
      logic [LOGN-1:0] local_cnt;
      local_cnt = cnt - LOGN'(2 * k);
      bypass[k] = !local_cnt[LOGN-1-k];
    end
  end

endmodule
