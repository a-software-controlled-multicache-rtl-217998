// One private cache of the multiprocessor: operating-mode register, tag and
// status store (with the per-line shared tags), data array and the
// controller that sequences them.
//
// The processor side takes loads, stores and the four cache commands
// (Normal, Bypass, Shared, Save); the memory side issues line and word
// transfers to main memory.  Both handshakes and the cycle timing are those
// of cache_controller.  The default geometry (2-way set-associative,
// 16 sets, 4-word lines of 32-bit words, 12-bit word addresses) is this
// design's choice; the protocol fixes none of it, and only recommends a
// small line size to keep the padding of shared items small.
module coherent_cache
  import mc_pkg::*;
#(
  parameter int unsigned WORD_W     = mc_pkg::WORD_W_DEF,
  parameter int unsigned ADDR_W     = mc_pkg::ADDR_W_DEF,
  parameter int unsigned LINE_WORDS = mc_pkg::LINE_WORDS_DEF,
  parameter int unsigned SETS       = mc_pkg::SETS_DEF,
  parameter int unsigned WAYS       = mc_pkg::WAYS_DEF,
  localparam int unsigned LINE_W = WORD_W * LINE_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  cpu_op_e           cpu_req_op,
  input  cache_cmd_e        cpu_req_cmd,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [WORD_W-1:0] cpu_req_wdata,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  // main memory side
  output logic              mem_req_valid,
  output mem_op_e           mem_req_op,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_rdata,
  // observation
  output cache_mode_e       mode,
  output cache_events_t     events
);

  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned OFF_W = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;

  logic              mode_cmd_valid, save_done;
  cache_cmd_e        mode_cmd;

  logic [SET_W-1:0]  lk_set;
  logic [TAG_W-1:0]  lk_tag;
  logic              hit;
  logic [WAY_W-1:0]  hit_way, victim_way;
  logic [WAYS-1:0]   way_valid, way_dirty, way_shared;
  logic [TAG_W-1:0]  way_tag [WAYS];
  logic              save_pending;
  logic [SET_W-1:0]  save_set;
  logic [WAY_W-1:0]  save_way;
  logic [TAG_W-1:0]  save_tag;
  logic              upd_en, upd_touch, upd_valid, upd_dirty, upd_shared;
  logic [SET_W-1:0]  upd_set;
  logic [WAY_W-1:0]  upd_way;
  logic [TAG_W-1:0]  upd_tag;

  logic [SET_W-1:0]  rd_set, wr_set;
  logic [WAY_W-1:0]  rd_way, wr_way;
  logic [LINE_W-1:0] rd_line, wr_line;
  logic              wr_line_en, wr_word_en;
  logic [OFF_W-1:0]  wr_off;
  logic [WORD_W-1:0] wr_word;

  cache_mode_ctrl u_mode (
    .clk, .rst_n,
    .cmd_valid (mode_cmd_valid),
    .cmd       (mode_cmd),
    .save_done,
    .mode_o    (mode)
  );

  cache_tag_store #(
    .SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)
  ) u_tags (
    .clk, .rst_n,
    .lk_set, .lk_tag, .hit, .hit_way, .victim_way,
    .way_valid, .way_dirty, .way_shared, .way_tag,
    .save_pending, .save_set, .save_way, .save_tag,
    .upd_en, .upd_touch, .upd_set, .upd_way,
    .upd_valid, .upd_dirty, .upd_shared, .upd_tag
  );

  cache_data_store #(
    .WORD_W(WORD_W), .LINE_WORDS(LINE_WORDS), .SETS(SETS), .WAYS(WAYS)
  ) u_data (
    .clk,
    .rd_set, .rd_way, .rd_line,
    .wr_line_en, .wr_word_en, .wr_set, .wr_way, .wr_off, .wr_line, .wr_word
  );

  cache_controller #(
    .WORD_W(WORD_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .SETS(SETS), .WAYS(WAYS)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_op, .cpu_req_cmd,
    .cpu_req_addr, .cpu_req_wdata, .cpu_resp_valid, .cpu_resp_rdata,
    .mode, .mode_cmd_valid, .mode_cmd, .save_done,
    .lk_set, .lk_tag, .hit, .hit_way, .victim_way,
    .way_valid, .way_dirty, .way_shared, .way_tag,
    .save_pending, .save_set, .save_way, .save_tag,
    .upd_en, .upd_touch, .upd_set, .upd_way,
    .upd_valid, .upd_dirty, .upd_shared, .upd_tag,
    .rd_set, .rd_way, .rd_line,
    .wr_line_en, .wr_word_en, .wr_set, .wr_way, .wr_off, .wr_line, .wr_word,
    .mem_req_valid, .mem_req_op, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata,
    .events
  );

endmodule
