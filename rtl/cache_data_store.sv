// Data array of one cache: SETS x WAYS lines of LINE_WORDS words.
//
// One read port returns a whole line, addressed by set and way, without a
// clock edge (the controller samples it in the same cycle).  One write port
// either replaces a whole line (a fill from main memory) or writes a single
// word of a line (a processor store hit).  Writes take effect at the next
// rising clock edge.  The array is not reset: a line's data is only read
// after its valid bit, held in the tag store, has been set by a fill.
// The organisation (line-wide read, word or line write) is this design's.
module cache_data_store #(
  parameter int unsigned WORD_W     = mc_pkg::WORD_W_DEF,
  parameter int unsigned LINE_WORDS = mc_pkg::LINE_WORDS_DEF,
  parameter int unsigned SETS       = mc_pkg::SETS_DEF,
  parameter int unsigned WAYS       = mc_pkg::WAYS_DEF,
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned OFF_W  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1,
  localparam int unsigned LINE_W = WORD_W * LINE_WORDS
) (
  input  logic              clk,
  // read port
  input  logic [SET_W-1:0]  rd_set,
  input  logic [WAY_W-1:0]  rd_way,
  output logic [LINE_W-1:0] rd_line,
  // write port
  input  logic              wr_line_en,   // write the whole line
  input  logic              wr_word_en,   // write one word
  input  logic [SET_W-1:0]  wr_set,
  input  logic [WAY_W-1:0]  wr_way,
  input  logic [OFF_W-1:0]  wr_off,
  input  logic [LINE_W-1:0] wr_line,
  input  logic [WORD_W-1:0] wr_word
);

  logic [LINE_W-1:0] mem [SETS*WAYS];

  assign rd_line = mem[rd_set * WAYS + rd_way];

  always_ff @(posedge clk) begin
    if (wr_line_en)
      mem[wr_set * WAYS + wr_way] <= wr_line;
    else if (wr_word_en)
      mem[wr_set * WAYS + wr_way][wr_off*WORD_W +: WORD_W] <= wr_word;
  end

endmodule
