// fb_memory: feedback delay buffer of one single-path delay-feedback stage.
//
// A word written in one enabled cycle is read back exactly DEPTH enabled
// cycles later, so a butterfly can pair sample x[n] with x[n+DEPTH]. It is a
// circular buffer: one address pointer, the word at the pointer is read
// (asynchronous read) and overwritten in the same cycle, so every cell is
// read and written once per DEPTH cycles (100% utilisation). The stages of
// an N-point pipeline use DEPTH = N/2, N/4, ..., 1, N-1 words in all.
// Contents are not reset; the first DEPTH words read after reset are
// whatever the array holds. Holds its state while en is low.
//
// The delay-feedback buffer and its sizes come from the SDF architecture;
// the circular-buffer organisation and the asynchronous read are this
// implementation's choice.
module fb_memory #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 26
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] wr_data,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign rd_data = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          ptr <= '0;
    else if (en && ptr == AW'(DEPTH-1)) ptr <= '0;
    else if (en)                         ptr <= ptr + 1'b1;
  end

endmodule
