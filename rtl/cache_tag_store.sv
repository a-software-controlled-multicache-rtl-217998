// Tag and status store of one cache.
//
// For every line it holds the address tag, a valid bit, a dirty bit (the
// line differs from main memory, needed by copy-back) and the one-bit
// shared tag of the protocol.  Each set also holds replacement status bits:
// a least-recently-used age per way.
//
// Lookup (no clock edge): for the set lk_set and tag lk_tag it reports
// hit / hit_way, the state of every way, and the victim way for a miss
// (the lowest invalid way, else the least recently used one).
// Save support (no clock edge): save_pending is high while any line has its
// shared tag asserted, and save_set / save_way name the lowest-numbered such
// line, so a Save sweep visits only shared lines.
// Update (one per cycle, at the rising edge): upd_en writes valid, dirty,
// shared and tag of line (upd_set, upd_way); upd_touch makes that way the
// most recently used of its set.
// Reset clears every valid, dirty and shared bit (the shared tag is cleared
// by invalidation, as the protocol requires) and sets the ages to the way
// numbers.  Set-associative mapping with replacement by status bits follows
// the protocol's system description; LRU ages are this design's choice.
module cache_tag_store #(
  parameter int unsigned SETS  = mc_pkg::SETS_DEF,
  parameter int unsigned WAYS  = mc_pkg::WAYS_DEF,
  parameter int unsigned TAG_W = 6,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [SET_W-1:0]  lk_set,
  input  logic [TAG_W-1:0]  lk_tag,
  output logic              hit,
  output logic [WAY_W-1:0]  hit_way,
  output logic [WAY_W-1:0]  victim_way,
  output logic [WAYS-1:0]   way_valid,
  output logic [WAYS-1:0]   way_dirty,
  output logic [WAYS-1:0]   way_shared,
  output logic [TAG_W-1:0]  way_tag [WAYS],
  // next shared-tagged line, for Save
  output logic              save_pending,
  output logic [SET_W-1:0]  save_set,
  output logic [WAY_W-1:0]  save_way,
  output logic [TAG_W-1:0]  save_tag,
  // update
  input  logic              upd_en,
  input  logic              upd_touch,
  input  logic [SET_W-1:0]  upd_set,
  input  logic [WAY_W-1:0]  upd_way,
  input  logic              upd_valid,
  input  logic              upd_dirty,
  input  logic              upd_shared,
  input  logic [TAG_W-1:0]  upd_tag
);

  logic [SETS-1:0][WAYS-1:0]  valid_q, dirty_q, shared_q;
  logic [TAG_W-1:0]           tag_q [SETS][WAYS];
  logic [SETS-1:0][WAYS-1:0][WAY_W-1:0] age_q;

  // ---- lookup ----
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      way_valid[w]  = valid_q[lk_set][w];
      way_dirty[w]  = dirty_q[lk_set][w];
      way_shared[w] = shared_q[lk_set][w];
      way_tag[w]    = tag_q[lk_set][w];
      if (valid_q[lk_set][w] && tag_q[lk_set][w] == lk_tag && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  // victim: lowest invalid way, otherwise the oldest way
  always_comb begin
    logic found;
    found      = 1'b0;
    victim_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!valid_q[lk_set][w] && !found) begin
        found      = 1'b1;
        victim_way = WAY_W'(w);
      end
    end
    if (!found) begin
      for (int w = 0; w < WAYS; w++)
        if (age_q[lk_set][w] == WAY_W'(WAYS - 1)) victim_way = WAY_W'(w);
    end
  end

  // ---- next shared-tagged line ----
  always_comb begin
    save_pending = 1'b0;
    save_set     = '0;
    save_way     = '0;
    for (int s = SETS - 1; s >= 0; s--) begin
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (shared_q[s][w]) begin
          save_pending = 1'b1;
          save_set     = SET_W'(s);
          save_way     = WAY_W'(w);
        end
      end
    end
    save_tag = tag_q[save_set][save_way];
  end

  // ---- update ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      dirty_q  <= '0;
      shared_q <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          age_q[s][w] <= WAY_W'(w);
    end else begin
      if (upd_en) begin
        valid_q[upd_set][upd_way]  <= upd_valid;
        dirty_q[upd_set][upd_way]  <= upd_dirty;
        shared_q[upd_set][upd_way] <= upd_shared;
      end
      if (upd_touch) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == upd_way)
            age_q[upd_set][w] <= '0;
          else if (age_q[upd_set][w] < age_q[upd_set][upd_way])
            age_q[upd_set][w] <= age_q[upd_set][w] + 1'b1;
        end
      end
    end
  end

  // tags need no reset: a tag is only compared while its line is valid
  always_ff @(posedge clk) begin
    if (upd_en) tag_q[upd_set][upd_way] <= upd_tag;
  end

endmodule
