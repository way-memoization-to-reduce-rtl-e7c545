// icache_data_array: instruction word storage of the cache.
//
// Holds NSETS sub-banks x NWAYS lines x WORDS_PER_LINE 32-bit words
// (16 KB by default). A fetch reads the one addressed word of one way of
// one sub-bank: only that word is read out, as in a CAM-tag cache where the
// match line drives a single word line. The read is synchronous: the word
// addressed in a cycle with rd_en appears on rd_data after the clock edge
// and is held until the next read. A refill writes one word per cycle.
// The array has no reset; a word is only read after its line was filled.
//
// The size and organisation follow the published design; the one-read/one-write
// port model of the sub-banked array is this design's simplification.
// NSETS, NWAYS and WORDS_PER_LINE must be powers of two.
module icache_data_array #(
  parameter int unsigned NSETS          = 8,
  parameter int unsigned NWAYS          = 64,
  parameter int unsigned WORDS_PER_LINE = 8,
  localparam int unsigned SET_W  = wm_pkg::clog2u(NSETS),
  localparam int unsigned WAY_W  = wm_pkg::clog2u(NWAYS),
  localparam int unsigned WORD_W = wm_pkg::clog2u(WORDS_PER_LINE),
  localparam int unsigned DEPTH  = NSETS * NWAYS * WORDS_PER_LINE
) (
  input  logic                       clk,
  input  logic                       rd_en,
  input  logic [SET_W-1:0]           rd_bank,
  input  logic [WAY_W-1:0]           rd_way,
  input  logic [WORD_W-1:0]          rd_word,
  output logic [wm_pkg::INSTR_W-1:0] rd_data,
  input  logic                       wr_en,
  input  logic [SET_W-1:0]           wr_bank,
  input  logic [WAY_W-1:0]           wr_way,
  input  logic [WORD_W-1:0]          wr_word,
  input  logic [wm_pkg::INSTR_W-1:0] wr_data
);

  logic [wm_pkg::INSTR_W-1:0] mem [DEPTH];

  // word address = {sub-bank, way, word}
  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_way, wr_word}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_bank, rd_way, rd_word}];
  end

endmodule
