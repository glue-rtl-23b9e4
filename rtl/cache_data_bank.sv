// cache_data_bank: the line storage of a cache, one line per (set, way).
//
// Reads are combinational (rd_data follows rd_set/rd_way in the same cycle)
// and writes take effect at the clock edge, merged word by word under
// wr_mask, so the coherence FSM reads and writes lines directly without a
// request/response hop. That follows the document, which moved the data
// storage into the FSM's reach to save a cycle on every hit; the same module
// serves the L2 and, with more ways, the L3. The word-mask write is this
// design's choice. Contents are not reset: a line is always written before
// its state lets anyone read it.
module cache_data_bank
  import glue_pkg::*;
#(
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L2_WAYS,
  parameter int unsigned SET_W = $clog2(SETS),
  parameter int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic                  clk,
  input  logic [SET_W-1:0]      rd_set,
  input  logic [WAY_W-1:0]      rd_way,
  output line_t                 rd_data,
  input  logic                  wr_en,
  input  logic [SET_W-1:0]      wr_set,
  input  logic [WAY_W-1:0]      wr_way,
  input  logic [LINE_WORDS-1:0] wr_mask,
  input  line_t                 wr_data
);
  line_t mem [SETS*WAYS];

  assign rd_data = mem[{rd_set, rd_way}];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int w = 0; w < LINE_WORDS; w++)
        if (wr_mask[w]) mem[{wr_set, wr_way}][w*WORD_W +: WORD_W] <= wr_data[w*WORD_W +: WORD_W];
    end
  end
endmodule
