// Testbench of the tag and status store, with 4 ways so that the
// least-recently-used choice is exercised beyond two ways.  A reference
// keeps every line's valid, dirty, shared and tag bits and a recency list
// per set.  Random updates and touches are applied, and after each one a
// random lookup is compared: hit and hit way, per-way state, victim (lowest
// invalid way, else least recently used) and the next shared line for Save
// (lowest set, then lowest way, with its shared tag asserted).
module tb_cache_tag_store;
  localparam int unsigned SETS = 8, WAYS = 4, TAG_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]       lk_set = '0, upd_set = '0, save_set;
  logic [TAG_W-1:0] lk_tag = '0, upd_tag = '0, save_tag;
  logic             hit, save_pending;
  logic [1:0]       hit_way, victim_way, save_way, upd_way = '0;
  logic [WAYS-1:0]  way_valid, way_dirty, way_shared;
  logic [TAG_W-1:0] way_tag [WAYS];
  logic             upd_en = 1'b0, upd_touch = 1'b0;
  logic             upd_valid = 1'b0, upd_dirty = 1'b0, upd_shared = 1'b0;

  cache_tag_store #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.*);

  bit             r_valid [SETS][WAYS], r_dirty [SETS][WAYS], r_shared [SETS][WAYS];
  int             r_tag   [SETS][WAYS];
  int             rec     [SETS][WAYS];   // rec[s][0] = most recently used way

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input int s, input int t);
    int  e_hit_way, e_victim;
    bit  e_hit, e_pend;
    int  e_ss, e_sw;
    lk_set = 3'(s); lk_tag = TAG_W'(t);
    #1;
    e_hit = 0; e_hit_way = 0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (r_valid[s][w] && r_tag[s][w] == t) begin e_hit = 1; e_hit_way = w; end
    check(hit == e_hit, $sformatf("hit set %0d tag %0d", s, t));
    if (e_hit) check(hit_way == 2'(e_hit_way), "hit way");
    e_victim = -1;
    for (int w = WAYS - 1; w >= 0; w--) if (!r_valid[s][w]) e_victim = w;
    if (e_victim < 0) e_victim = rec[s][WAYS-1];
    check(victim_way == 2'(e_victim), $sformatf("victim set %0d: %0d expected %0d", s, victim_way, e_victim));
    for (int w = 0; w < WAYS; w++) begin
      check(way_valid[w] == r_valid[s][w] && way_dirty[w] == r_dirty[s][w] &&
            way_shared[w] == r_shared[s][w], "way state bits");
      if (r_valid[s][w]) check(way_tag[w] == TAG_W'(r_tag[s][w]), "way tag");
    end
    e_pend = 0; e_ss = 0; e_sw = 0;
    for (int ss = SETS - 1; ss >= 0; ss--)
      for (int w = WAYS - 1; w >= 0; w--)
        if (r_shared[ss][w]) begin e_pend = 1; e_ss = ss; e_sw = w; end
    check(save_pending == e_pend, "save pending");
    if (e_pend) begin
      check(save_set == 3'(e_ss) && save_way == 2'(e_sw), "next shared line");
      check(save_tag == TAG_W'(r_tag[e_ss][e_sw]), "next shared line tag");
    end
  endtask

  task automatic ref_touch(input int s, input int w);
    int pos;
    pos = 0;
    for (int k = 0; k < WAYS; k++) if (rec[s][k] == w) pos = k;
    for (int k = pos; k > 0; k--) rec[s][k] = rec[s][k-1];
    rec[s][0] = w;
  endtask

  initial begin
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        r_valid[s][w] = 0; r_dirty[s][w] = 0; r_shared[s][w] = 0; r_tag[s][w] = 0;
        rec[s][w] = w;   // reset ages equal the way numbers: way 0 newest
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    compare(0, 0);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      upd_set    = 3'($urandom_range(0, SETS - 1));
      upd_way    = 2'($urandom_range(0, WAYS - 1));
      upd_tag    = TAG_W'($urandom_range(0, 7));
      upd_valid  = ($urandom_range(0, 4) != 0);
      upd_dirty  = upd_valid && $urandom_range(0, 1);
      upd_shared = upd_valid && ($urandom_range(0, 5) == 0);
      upd_en     = ($urandom_range(0, 1) == 0);
      upd_touch  = ($urandom_range(0, 1) == 0);
      if (upd_en) begin
        r_valid[upd_set][upd_way]  = upd_valid;
        r_dirty[upd_set][upd_way]  = upd_dirty;
        r_shared[upd_set][upd_way] = upd_shared;
        r_tag[upd_set][upd_way]    = int'(upd_tag);
      end
      if (upd_touch) ref_touch(int'(upd_set), int'(upd_way));
      @(negedge clk);
      upd_en = 1'b0; upd_touch = 1'b0;
      compare(int'(upd_set), int'(upd_tag));
      compare($urandom_range(0, SETS - 1), $urandom_range(0, 7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
