// Self-checking testbench of one cache (coherent_cache, and through it
// cache_controller, cache_tag_store, cache_data_store, cache_mode_ctrl).
//
// A processor model drives loads, stores and cache commands; a main-memory
// model written here answers line and word transfers after a fixed latency
// and keeps its own copy of memory, so the testbench can see exactly what
// the cache wrote back and when.  Directed checks cover: hit and miss
// latency, copy-back on replacement of a dirty line, stores staying in the
// cache in normal mode, bypass accesses going to memory only, shared tags
// set by shared-mode accesses, and the Save command (which lines it writes,
// that it invalidates them, its cycle count 2 + k*(1+T) and the return to
// normal mode).  A random phase then mixes loads and stores in normal and
// shared mode with periodic Saves against a reference of the latest value
// of every word, and checks memory after each Save.
module tb_coherent_cache;
  import mc_pkg::*;

  localparam int unsigned WORD_W = 32, ADDR_W = 12, LINE_WORDS = 4;
  localparam int unsigned SETS = 16, WAYS = 2;
  localparam int unsigned LINE_W = WORD_W * LINE_WORDS;
  localparam int unsigned MLAT = 3;          // model: busy cycles
  localparam int unsigned T    = MLAT + 2;   // cycles a transfer is pending

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cpu_req_valid = 1'b0, cpu_req_ready;
  cpu_op_e           cpu_req_op = CPU_LOAD;
  cache_cmd_e        cpu_req_cmd = CMD_NORMAL;
  logic [ADDR_W-1:0] cpu_req_addr = '0;
  logic [WORD_W-1:0] cpu_req_wdata = '0;
  logic              cpu_resp_valid;
  logic [WORD_W-1:0] cpu_resp_rdata;
  logic              mem_req_valid, mem_resp_valid;
  mem_op_e           mem_req_op;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0] mem_req_wdata, mem_resp_rdata;
  cache_mode_e       mode;
  cache_events_t     events;

  coherent_cache #(
    .WORD_W(WORD_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .SETS(SETS), .WAYS(WAYS)
  ) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d]: %s", cyc, what);
    end
  endtask

  // ---------------- main memory model ----------------
  logic [WORD_W-1:0] mm [2**ADDR_W];
  int  m_state = 0, m_cnt = 0;
  int  n_rd_line = 0, n_wr_line = 0, n_rd_word = 0, n_wr_word = 0;
  logic [LINE_W-1:0] m_rdata = '0;
  assign mem_resp_valid = (m_state == 2);
  assign mem_resp_rdata = m_rdata;

  always @(posedge clk) begin
    if (!rst_n) m_state <= 0;
    else if (m_state == 0 && mem_req_valid) begin
      m_state <= 1; m_cnt <= MLAT - 1;
    end else if (m_state == 1) begin
      if (m_cnt == 0) begin
        logic [ADDR_W-1:0] b;
        b = mem_req_addr & ~ADDR_W'(LINE_WORDS - 1);
        case (mem_req_op)
          MEM_RD_LINE: begin
            n_rd_line++;
            for (int w = 0; w < LINE_WORDS; w++) m_rdata[w*WORD_W +: WORD_W] <= mm[b + w];
          end
          MEM_WR_LINE: begin
            n_wr_line++;
            for (int w = 0; w < LINE_WORDS; w++) mm[b + w] = mem_req_wdata[w*WORD_W +: WORD_W];
          end
          MEM_RD_WORD: begin n_rd_word++; m_rdata <= LINE_W'(mm[mem_req_addr]); end
          MEM_WR_WORD: begin n_wr_word++; mm[mem_req_addr] = mem_req_wdata[WORD_W-1:0]; end
        endcase
        m_state <= 2;
      end else m_cnt <= m_cnt - 1;
    end else if (m_state == 2) m_state <= 0;
  end

  int ev_hit = 0, ev_miss = 0, ev_wb = 0, ev_byp = 0, ev_sh = 0, ev_sl = 0, ev_sd = 0;
  always @(posedge clk) begin
    ev_hit += int'(events.hit);   ev_miss += int'(events.miss);
    ev_wb  += int'(events.writeback); ev_byp += int'(events.bypass);
    ev_sh  += int'(events.shared_set); ev_sl += int'(events.save_line);
    ev_sd  += int'(events.save_done);
  end

  // ---------------- processor model ----------------
  int last_lat;
  task automatic cpu(input cpu_op_e op, input cache_cmd_e cmd,
                     input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd,
                     output logic [WORD_W-1:0] rd);
    int c0;
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req_op = op; cpu_req_cmd = cmd;
    cpu_req_addr = a; cpu_req_wdata = wd;
    while (!cpu_req_ready) @(negedge clk);
    c0 = cyc;
    @(negedge clk);
    cpu_req_valid = 1'b0;
    while (!cpu_resp_valid) @(negedge clk);
    rd = cpu_resp_rdata;
    last_lat = cyc - c0;
  endtask

  logic [WORD_W-1:0] r;
  task automatic ld(input logic [ADDR_W-1:0] a, output logic [WORD_W-1:0] v);
    cpu(CPU_LOAD, CMD_NORMAL, a, '0, v);
  endtask
  task automatic st(input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] d;
    cpu(CPU_STORE, CMD_NORMAL, a, v, d);
  endtask
  task automatic cmd(input cache_cmd_e c);
    logic [WORD_W-1:0] d;
    cpu(CPU_CMD, c, '0, '0, d);
  endtask

  function automatic logic [WORD_W-1:0] init_val(int a);
    return WORD_W'(32'hA500_0000 ^ (a * 32'h0001_0003));
  endfunction
  // word address of (tag, set, offset)
  function automatic logic [ADDR_W-1:0] ad(int tag, int set, int off);
    return ADDR_W'(tag * SETS * LINE_WORDS + set * LINE_WORDS + off);
  endfunction

  // reference: latest value of each word as seen by the processor
  logic [WORD_W-1:0] ref_v [2**ADDR_W];

  initial begin
    int wr0, hits0, t0;
    for (int a = 0; a < 2**ADDR_W; a++) begin mm[a] = init_val(a); ref_v[a] = mm[a]; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- reset state ----
    check(mode == MODE_NORMAL, "reset mode is normal");

    // ---- miss then hit ----
    ld(ad(1, 3, 2), r);
    check(r == init_val(ad(1, 3, 2)), "miss returns memory data");
    check(n_rd_line == 1 && ev_miss == 1, $sformatf("miss fetches one line (%0d %0d)", n_rd_line, ev_miss));
    check(last_lat == 2 + T + 1, $sformatf("miss latency %0d (clean victim)", last_lat));
    ld(ad(1, 3, 1), r);
    check(r == init_val(ad(1, 3, 1)), "hit returns line data");
    check(last_lat == 2, $sformatf("hit latency %0d", last_lat));
    check(n_rd_line == 1 && ev_hit == 2, "hit causes no memory traffic");

    // ---- copy-back: store stays in cache until replacement ----
    st(ad(1, 3, 1), 32'h1111_0001);
    check(mm[ad(1, 3, 1)] == init_val(ad(1, 3, 1)), "normal-mode store not written to memory");
    ld(ad(1, 3, 1), r);
    check(r == 32'h1111_0001, "store visible to later load");
    ld(ad(2, 3, 0), r);                       // second way of set 3
    check(r == init_val(ad(2, 3, 0)), "second way filled");
    ld(ad(2, 3, 0), r);                       // make tag 2 most recent
    wr0 = n_wr_line;
    ld(ad(3, 3, 0), r);                       // evicts tag 1 (LRU, dirty)
    check(n_wr_line == wr0 + 1 && ev_wb == 1, "dirty LRU victim copied back");
    check(mm[ad(1, 3, 1)] == 32'h1111_0001, "copied-back data in memory");
    check(last_lat == 2 + T + T + 1, $sformatf("miss latency %0d (dirty victim)", last_lat));
    wr0 = n_wr_line;
    ld(ad(4, 3, 0), r);                       // evicts tag 2 (clean)
    check(n_wr_line == wr0, "clean victim not copied back");
    ld(ad(1, 3, 1), r);
    check(r == 32'h1111_0001, "reloaded line holds stored value");

    // ---- bypass mode ----
    cmd(CMD_BYPASS);
    check(last_lat == 1, "mode command answered in one cycle");
    check(mode == MODE_BYPASS, "Bypass command selects bypass mode");
    hits0 = ev_hit + ev_miss;
    st(ad(5, 7, 0), 32'hBEEF_0005);
    check(mm[ad(5, 7, 0)] == 32'hBEEF_0005 && n_wr_word == 1, "bypass store goes to memory");
    ld(ad(5, 7, 0), r);
    check(r == 32'hBEEF_0005 && n_rd_word == 1, "bypass load from memory");
    ld(ad(1, 3, 1), r);                       // cached dirty word, memory is read instead
    check(r == 32'h1111_0001, "bypass load reads memory copy");
    check(ev_hit + ev_miss == hits0 && ev_byp == 3, "bypass does no cache search");
    cmd(CMD_NORMAL);
    check(mode == MODE_NORMAL, "Normal command selects normal mode");
    ld(ad(5, 7, 0), r);
    check(r == 32'hBEEF_0005 && ev_miss > 0, "bypass store did not allocate a line");
    mm[ad(5, 7, 0)] = 32'h0;                  // remember: line (5,7) now cached clean

    // ---- shared mode and Save ----
    cmd(CMD_SHARED);
    check(mode == MODE_SHARED, "Shared command selects shared mode");
    ld(ad(6, 9, 0), r);                       // miss, shared tag set
    st(ad(6, 9, 2), 32'h5A5A_0092);           // shared line, dirty
    ld(ad(5, 7, 0), r);                       // hit on clean line: shared tag set
    check(ev_sh == 2, "shared-mode accesses set two shared tags");
    cmd(CMD_NORMAL);
    st(ad(7, 10, 0), 32'h0000_7A00);          // local data, normal mode: not shared
    check(mm[ad(6, 9, 2)] == init_val(ad(6, 9, 2)), "shared store stays in cache");
    cmd(CMD_SHARED);
    wr0 = n_wr_line;
    cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
    check(last_lat == 2 + 2 * (1 + T), $sformatf("Save of 2 lines takes %0d cycles", last_lat));
    check(n_wr_line == wr0 + 2 && ev_sl == 2 && ev_sd == 1, "Save copies exactly the shared lines");
    check(mm[ad(6, 9, 2)] == 32'h5A5A_0092, "Save wrote the shared dirty data");
    check(mm[ad(5, 7, 0)] == 32'hBEEF_0005, "Save copies a clean shared line too");
    check(mm[ad(7, 10, 0)] == init_val(ad(7, 10, 0)), "Save leaves unshared dirty lines");
    check(mode == MODE_NORMAL, "Save returns the cache to normal mode");
    t0 = ev_miss;
    ld(ad(6, 9, 2), r);
    check(ev_miss == t0 + 1 && r == 32'h5A5A_0092, "saved line was invalidated");
    ld(ad(7, 10, 0), r);
    check(ev_miss == t0 + 1 && r == 32'h0000_7A00, "unshared line still valid");
    cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
    check(last_lat == 2, "Save with no shared line takes 2 cycles");
    // the line was reloaded in normal mode; a critical section touches it
    // in shared mode and leaves with Save
    cmd(CMD_SHARED);
    ld(ad(6, 9, 2), r);
    cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
    // another process may now change memory; re-entry must see it
    mm[ad(6, 9, 2)] = 32'hC0DE_0001;
    cmd(CMD_SHARED);
    ld(ad(6, 9, 2), r);
    check(r == 32'hC0DE_0001, "re-entry reads the other processor's value");
    cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
    check(last_lat == 2 + 1 * (1 + T), "Save of 1 line");

    // ---- random phase against a reference ----
    for (int a = 0; a < 2**ADDR_W; a++) ref_v[a] = mm[a];
    // lines still dirty in the cache
    ref_v[ad(7, 10, 0)] = 32'h0000_7A00;
    for (int it = 0; it < 3000; it++) begin
      int sel;
      logic [ADDR_W-1:0] a;
      sel = int'($urandom_range(0, 99));
      a = ADDR_W'($urandom_range(0, 255)) | ADDR_W'(($urandom_range(0, 7)) << 8);
      if (sel < 40) begin
        ld(a, r);
        check(r == ref_v[a], $sformatf("random load %h: got %h exp %h", a, r, ref_v[a]));
      end else if (sel < 80) begin
        logic [WORD_W-1:0] v;
        v = $urandom;
        st(a, v);
        ref_v[a] = v;
      end else if (sel < 88) begin
        cmd(CMD_SHARED);
      end else if (sel < 95) begin
        cmd(CMD_NORMAL);
      end else begin
        cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
        check(mode == MODE_NORMAL, "random Save ends in normal mode");
      end
    end
    // final: put every line in shared state by touching it in shared mode is
    // not possible for evicted lines, so compare memory for lines not cached
    cpu(CPU_CMD, CMD_SAVE, '0, '0, r);
    for (int a = 0; a < 2**ADDR_W; a++) begin
      logic [ADDR_W-1:0] aa;
      aa = ADDR_W'(a);
      if (mm[aa] != ref_v[aa]) begin
        // must then be held dirty in the cache: a load returns ref value
        ld(aa, r);
        check(r == ref_v[aa], $sformatf("final %h", aa));
      end
    end
    check(ev_sh > 0 && ev_wb > 1 && ev_sl > 2, "random phase exercised shared, copy-back, Save");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
