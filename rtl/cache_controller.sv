// Sequencer of one cache of the software-controlled coherence protocol.
//
// The processor hands the cache one request at a time: a load, a store or a
// cache command.  What an access does depends on the operating mode:
//   normal  - ordinary copy-back cache access; the shared tag is untouched.
//   shared  - the same access, and the referenced line's shared tag is set.
//   bypass  - the access is carried out in main memory only, with no cache
//             search or update.
// A miss picks a victim in the set; if the victim is dirty it is copied back
// to memory first, then the missing line is fetched, installed with its
// shared tag clear, and the access is repeated as a hit.  The Normal, Bypass
// and Shared commands only switch the mode.  The Save command copies every
// line whose shared tag is set into main memory and invalidates it (which
// clears the tag), then switches the cache to normal mode.  These rules are
// the protocol's.  Save copies a shared line whether or not it is dirty, as
// the protocol states; replacement copies back only dirty lines, which is
// the usual copy-back rule and this design's reading of it.  Save visits
// the shared lines only, so its time grows with their number and not with
// the cache size.
//
// Processor side: cpu_req_valid / cpu_req_ready handshake; the request is
// taken when both are high.  Exactly one cpu_resp_valid pulse answers each
// request (load data on cpu_resp_rdata; stores and commands return 0).
// Memory side: mem_req_valid and its fields are held stable until the
// one-cycle mem_resp_valid acknowledgement; line reads return data on
// mem_resp_rdata, word reads in its lowest word.
//
// Timing, counted from the cycle a request is taken (cycle 0):
//   command Normal/Bypass/Shared: response in cycle 1, new mode in cycle 1.
//   hit: response in cycle 2.
//   miss: 2 + (clean victim) F or (dirty victim) W + F cycles, where F and W
//         are the cycles a memory transfer is pending, then the repeated
//         lookup; bypass access: response one cycle after the memory ack.
//   Save with k shared lines and memory transfers of T cycles each:
//         response in cycle 2 + k*(1 + T).
module cache_controller
  import mc_pkg::*;
#(
  parameter int unsigned WORD_W     = mc_pkg::WORD_W_DEF,
  parameter int unsigned ADDR_W     = mc_pkg::ADDR_W_DEF,
  parameter int unsigned LINE_WORDS = mc_pkg::LINE_WORDS_DEF,
  parameter int unsigned SETS       = mc_pkg::SETS_DEF,
  parameter int unsigned WAYS       = mc_pkg::WAYS_DEF,
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned OFF_W  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1,
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - SET_W,
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
  // operating mode
  input  cache_mode_e       mode,
  output logic              mode_cmd_valid,
  output cache_cmd_e        mode_cmd,
  output logic              save_done,
  // tag store
  output logic [SET_W-1:0]  lk_set,
  output logic [TAG_W-1:0]  lk_tag,
  input  logic              hit,
  input  logic [WAY_W-1:0]  hit_way,
  input  logic [WAY_W-1:0]  victim_way,
  input  logic [WAYS-1:0]   way_valid,
  input  logic [WAYS-1:0]   way_dirty,
  input  logic [WAYS-1:0]   way_shared,
  input  logic [TAG_W-1:0]  way_tag [WAYS],
  input  logic              save_pending,
  input  logic [SET_W-1:0]  save_set,
  input  logic [WAY_W-1:0]  save_way,
  input  logic [TAG_W-1:0]  save_tag,
  output logic              upd_en,
  output logic              upd_touch,
  output logic [SET_W-1:0]  upd_set,
  output logic [WAY_W-1:0]  upd_way,
  output logic              upd_valid,
  output logic              upd_dirty,
  output logic              upd_shared,
  output logic [TAG_W-1:0]  upd_tag,
  // data store
  output logic [SET_W-1:0]  rd_set,
  output logic [WAY_W-1:0]  rd_way,
  input  logic [LINE_W-1:0] rd_line,
  output logic              wr_line_en,
  output logic              wr_word_en,
  output logic [SET_W-1:0]  wr_set,
  output logic [WAY_W-1:0]  wr_way,
  output logic [OFF_W-1:0]  wr_off,
  output logic [LINE_W-1:0] wr_line,
  output logic [WORD_W-1:0] wr_word,
  // main memory side
  output logic              mem_req_valid,
  output mem_op_e           mem_req_op,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_rdata,
  // observation
  output cache_events_t     events
);

  typedef enum logic [2:0] {
    S_IDLE,     // waiting for a request
    S_LOOKUP,   // search the set, serve a hit
    S_WB,       // copy a dirty victim back to memory
    S_FILL,     // fetch the missing line
    S_BYPASS,   // word access carried out in memory only
    S_SAVE,     // pick the next shared-tagged line
    S_SAVE_WB   // copy it to memory, then invalidate it
  } state_e;

  state_e            state_q, state_d;
  cpu_op_e           op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [WORD_W-1:0] wdata_q;
  logic [WAY_W-1:0]  victim_q;
  logic [SET_W-1:0]  sv_set_q;
  logic [WAY_W-1:0]  sv_way_q;
  logic [TAG_W-1:0]  sv_tag_q;
  logic              resp_valid_q;
  logic [WORD_W-1:0] resp_rdata_q;
  logic              resp_set;
  logic [WORD_W-1:0] resp_rdata_d;

  logic [OFF_W-1:0]  req_off;
  logic [SET_W-1:0]  req_set;
  logic [TAG_W-1:0]  req_tag;

  assign req_off = (LINE_WORDS > 1) ? addr_q[OFF_W-1:0] : '0;
  assign req_set = (SETS > 1) ? addr_q[OFF_W +: SET_W] : '0;
  assign req_tag = addr_q[ADDR_W-1 -: TAG_W];

  assign lk_set = req_set;
  assign lk_tag = req_tag;

  assign cpu_req_ready  = (state_q == S_IDLE);
  assign cpu_resp_valid = resp_valid_q;
  assign cpu_resp_rdata = resp_rdata_q;

  function automatic logic [ADDR_W-1:0] line_addr(logic [TAG_W-1:0] tag,
                                                  logic [SET_W-1:0] set);
    logic [ADDR_W-1:0] a;
    a = '0;
    a[ADDR_W-1 -: TAG_W] = tag;
    if (SETS > 1) a[OFF_W +: SET_W] = set;
    return a;
  endfunction

  always_comb begin
    state_d        = state_q;
    resp_set       = 1'b0;
    resp_rdata_d   = '0;
    mode_cmd_valid = 1'b0;
    mode_cmd       = cpu_req_cmd;
    save_done      = 1'b0;
    upd_en         = 1'b0;
    upd_touch      = 1'b0;
    upd_set        = req_set;
    upd_way        = hit_way;
    upd_valid      = 1'b1;
    upd_dirty      = 1'b0;
    upd_shared     = 1'b0;
    upd_tag        = req_tag;
    rd_set         = req_set;
    rd_way         = hit_way;
    wr_line_en     = 1'b0;
    wr_word_en     = 1'b0;
    wr_set         = req_set;
    wr_way         = hit_way;
    wr_off         = req_off;
    wr_line        = mem_resp_rdata;
    wr_word        = wdata_q;
    mem_req_valid  = 1'b0;
    mem_req_op     = MEM_RD_LINE;
    mem_req_addr   = line_addr(req_tag, req_set);
    mem_req_wdata  = '0;
    events         = '0;

    unique case (state_q)
      S_IDLE: begin
        if (cpu_req_valid) begin
          if (cpu_req_op == CPU_CMD) begin
            if (cpu_req_cmd == CMD_SAVE) begin
              state_d = S_SAVE;
            end else begin
              mode_cmd_valid = 1'b1;
              resp_set       = 1'b1;
            end
          end else if (mode == MODE_BYPASS) begin
            state_d = S_BYPASS;
          end else begin
            state_d = S_LOOKUP;
          end
        end
      end

      S_LOOKUP: begin
        if (hit) begin
          events.hit        = 1'b1;
          events.shared_set = (mode == MODE_SHARED) && !way_shared[hit_way];
          upd_en     = 1'b1;
          upd_touch  = 1'b1;
          upd_way    = hit_way;
          upd_valid  = 1'b1;
          upd_dirty  = way_dirty[hit_way] || (op_q == CPU_STORE);
          upd_shared = way_shared[hit_way] || (mode == MODE_SHARED);
          upd_tag    = req_tag;
          if (op_q == CPU_STORE) begin
            wr_word_en = 1'b1;
            wr_way     = hit_way;
          end else begin
            resp_rdata_d = rd_line[req_off*WORD_W +: WORD_W];
          end
          resp_set = 1'b1;
          state_d  = S_IDLE;
        end else begin
          events.miss = 1'b1;
          if (way_valid[victim_way] && way_dirty[victim_way])
            state_d = S_WB;
          else
            state_d = S_FILL;
        end
      end

      S_WB: begin
        rd_way        = victim_q;
        mem_req_valid = 1'b1;
        mem_req_op    = MEM_WR_LINE;
        mem_req_addr  = line_addr(way_tag[victim_q], req_set);
        mem_req_wdata = rd_line;
        if (mem_resp_valid) begin
          events.writeback = 1'b1;
          state_d = S_FILL;
        end
      end

      S_FILL: begin
        mem_req_valid = 1'b1;
        mem_req_op    = MEM_RD_LINE;
        mem_req_addr  = line_addr(req_tag, req_set);
        if (mem_resp_valid) begin
          // install the line clean, with its shared tag clear
          wr_line_en = 1'b1;
          wr_way     = victim_q;
          wr_line    = mem_resp_rdata;
          upd_en     = 1'b1;
          upd_way    = victim_q;
          upd_valid  = 1'b1;
          upd_dirty  = 1'b0;
          upd_shared = 1'b0;
          upd_tag    = req_tag;
          state_d    = S_LOOKUP;
        end
      end

      S_BYPASS: begin
        mem_req_valid = 1'b1;
        mem_req_op    = (op_q == CPU_STORE) ? MEM_WR_WORD : MEM_RD_WORD;
        mem_req_addr  = addr_q;
        mem_req_wdata = LINE_W'(wdata_q);
        if (mem_resp_valid) begin
          events.bypass = 1'b1;
          resp_set      = 1'b1;
          if (op_q == CPU_LOAD) resp_rdata_d = mem_resp_rdata[WORD_W-1:0];
          state_d = S_IDLE;
        end
      end

      S_SAVE: begin
        if (save_pending) begin
          state_d = S_SAVE_WB;
        end else begin
          save_done = 1'b1;
          events.save_done = 1'b1;
          resp_set  = 1'b1;
          state_d   = S_IDLE;
        end
      end

      S_SAVE_WB: begin
        rd_set        = sv_set_q;
        rd_way        = sv_way_q;
        mem_req_valid = 1'b1;
        mem_req_op    = MEM_WR_LINE;
        mem_req_addr  = line_addr(sv_tag_q, sv_set_q);
        mem_req_wdata = rd_line;
        if (mem_resp_valid) begin
          // invalidate the line; invalidation clears the shared tag
          events.save_line = 1'b1;
          upd_en     = 1'b1;
          upd_set    = sv_set_q;
          upd_way    = sv_way_q;
          upd_valid  = 1'b0;
          upd_dirty  = 1'b0;
          upd_shared = 1'b0;
          upd_tag    = sv_tag_q;
          state_d    = S_SAVE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      resp_valid_q <= 1'b0;
      resp_rdata_q <= '0;
      op_q         <= CPU_LOAD;
      addr_q       <= '0;
      wdata_q      <= '0;
      victim_q     <= '0;
      sv_set_q     <= '0;
      sv_way_q     <= '0;
      sv_tag_q     <= '0;
    end else begin
      state_q      <= state_d;
      resp_valid_q <= resp_set;
      resp_rdata_q <= resp_set ? resp_rdata_d : '0;
      if (state_q == S_IDLE && cpu_req_valid) begin
        op_q    <= cpu_req_op;
        addr_q  <= cpu_req_addr;
        wdata_q <= cpu_req_wdata;
      end
      if (state_q == S_LOOKUP && !hit) victim_q <= victim_way;
      if (state_q == S_SAVE && save_pending) begin
        sv_set_q <= save_set;
        sv_way_q <= save_way;
        sv_tag_q <= save_tag;
      end
    end
  end

  // A memory request must stay stable until it is acknowledged.
  property p_mem_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (mem_req_valid && !mem_resp_valid) |=>
        (mem_req_valid && $stable(mem_req_op) && $stable(mem_req_addr));
  endproperty
  a_mem_req_stable: assert property (p_mem_req_stable)
    else $error("memory request changed before its acknowledgement");

endmodule
