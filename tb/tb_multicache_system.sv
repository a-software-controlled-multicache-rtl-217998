// End-to-end testbench of the multiprocessor memory system, at the default
// parameters (4 processors, 2-way 16-set caches with 4-word lines, 4096-word
// shared memory).
//
// Four processor models run concurrently.  They share a counter S and a
// second shared word S2, each on a line of its own, protected by a lock
// kept in a memory word TURN.  The lock is accessed in bypass mode only
// (Bypass command, read or write, Normal command), as the protocol asks for
// semaphores.  Inside the critical section a processor issues Shared, reads
// and increments S and S2, and leaves with Save before passing the lock on.
// Between critical sections every processor works on private data in
// normal mode, with enough addresses mapping to one set to force dirty
// replacements.  The testbench checks that each processor sees the value
// the previous owner wrote (coherence through Save), that private data read
// back correctly, and that the final memory holds the expected counters.
// It counts how often each mechanism happened (hit, miss, copy-back, bypass
// access, shared-tag set, Save of a line, each mode, contention for the
// memory path) and fails if one never did.
module tb_multicache_system;
  import mc_pkg::*;

  localparam int unsigned N = mc_pkg::N_CPU_DEF;
  localparam int unsigned WORD_W = mc_pkg::WORD_W_DEF;
  localparam int unsigned ADDR_W = mc_pkg::ADDR_W_DEF;
  localparam int unsigned LW     = mc_pkg::LINE_WORDS_DEF;
  localparam int unsigned SETS   = mc_pkg::SETS_DEF;
  localparam int unsigned ROUNDS = 6;       // critical sections per processor

  // shared items, one line each
  localparam logic [ADDR_W-1:0] A_TURN = ADDR_W'(12'h000);
  localparam logic [ADDR_W-1:0] A_S    = ADDR_W'(12'h010);
  localparam logic [ADDR_W-1:0] A_S2   = ADDR_W'(12'h021);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      cpu_req_valid = '0, cpu_req_ready, cpu_resp_valid;
  cpu_op_e           cpu_req_op    [N];
  cache_cmd_e        cpu_req_cmd   [N];
  logic [ADDR_W-1:0] cpu_req_addr  [N];
  logic [WORD_W-1:0] cpu_req_wdata [N];
  logic [WORD_W-1:0] cpu_resp_rdata [N];
  cache_mode_e       mode   [N];
  cache_events_t     events [N];
  logic              mem_contention;

  multicache_system dut (.*);

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

  // ---- mechanism counters ----
  int n_hit = 0, n_miss = 0, n_wb = 0, n_byp = 0, n_sh = 0, n_sl = 0, n_sd = 0;
  int n_mode_byp = 0, n_mode_sh = 0, n_cont = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      n_hit += int'(events[i].hit);  n_miss += int'(events[i].miss);
      n_wb  += int'(events[i].writeback); n_byp += int'(events[i].bypass);
      n_sh  += int'(events[i].shared_set); n_sl += int'(events[i].save_line);
      n_sd  += int'(events[i].save_done);
      n_mode_byp += int'(mode[i] == MODE_BYPASS);
      n_mode_sh  += int'(mode[i] == MODE_SHARED);
    end
    n_cont += int'(mem_contention);
  end

  // ---- processor models ----
  task automatic cpu(input int id, input cpu_op_e op, input cache_cmd_e c,
                     input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd,
                     output logic [WORD_W-1:0] rd);
    @(negedge clk);
    cpu_req_valid[id] = 1'b1; cpu_req_op[id] = op; cpu_req_cmd[id] = c;
    cpu_req_addr[id] = a; cpu_req_wdata[id] = wd;
    while (!cpu_req_ready[id]) @(negedge clk);
    @(negedge clk);
    cpu_req_valid[id] = 1'b0;
    while (!cpu_resp_valid[id]) @(negedge clk);
    rd = cpu_resp_rdata[id];
  endtask

  task automatic command(input int id, input cache_cmd_e c);
    logic [WORD_W-1:0] d;
    cpu(id, CPU_CMD, c, '0, '0, d);
  endtask

  // private region of processor id: words 0x400 + id*0x100 ...; tags differ
  // by whole cache sizes so several lines land in the same set
  function automatic logic [ADDR_W-1:0] priv(int id, int k);
    return ADDR_W'(12'h400 + id * 12'h100 + (k % 3) * SETS * LW + (k / 3) % LW);
  endfunction

  task automatic local_work(input int id, input int round);
    logic [WORD_W-1:0] d;
    for (int k = 0; k < 9; k++)
      cpu(id, CPU_STORE, CMD_NORMAL, priv(id, k), WORD_W'(id * 1000 + round * 10 + k), d);
    for (int k = 0; k < 9; k++) begin
      cpu(id, CPU_LOAD, CMD_NORMAL, priv(id, k), '0, d);
      check(d == WORD_W'(id * 1000 + round * 10 + k),
            $sformatf("cpu%0d private word %0d: %0d", id, k, d));
    end
  endtask

  // Wait: poll TURN in bypass mode until it names this processor
  task automatic lock(input int id);
    logic [WORD_W-1:0] t;
    command(id, CMD_BYPASS);
    forever begin
      cpu(id, CPU_LOAD, CMD_NORMAL, A_TURN, '0, t);
      if (t == WORD_W'(id)) break;
    end
    command(id, CMD_NORMAL);
  endtask

  // Signal: Save, then pass TURN on in bypass mode
  task automatic unlock(input int id);
    logic [WORD_W-1:0] d;
    command(id, CMD_SAVE);
    check(mode[id] == MODE_NORMAL, "Save leaves normal mode");
    command(id, CMD_BYPASS);
    cpu(id, CPU_STORE, CMD_NORMAL, A_TURN, WORD_W'((id + 1) % N), d);
    command(id, CMD_NORMAL);
  endtask

  int entries = 0;
  task automatic proc(input int id);
    logic [WORD_W-1:0] s, s2, d;
    for (int r = 0; r < ROUNDS; r++) begin
      local_work(id, r);
      lock(id);
      command(id, CMD_SHARED);
      cpu(id, CPU_LOAD, CMD_NORMAL, A_S, '0, s);
      check(s == WORD_W'(entries), $sformatf("cpu%0d sees S=%0d, expected %0d", id, s, entries));
      cpu(id, CPU_STORE, CMD_NORMAL, A_S, s + 1, d);
      cpu(id, CPU_LOAD, CMD_NORMAL, A_S2, '0, s2);
      check(s2 == WORD_W'(entries * 3), $sformatf("cpu%0d sees S2=%0d", id, s2));
      cpu(id, CPU_STORE, CMD_NORMAL, A_S2, s2 + 3, d);
      cpu(id, CPU_LOAD, CMD_NORMAL, A_S, '0, s);
      check(s == WORD_W'(entries + 1), "own update visible in the cache");
      entries++;
      unlock(id);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      cpu_req_op[i] = CPU_LOAD; cpu_req_cmd[i] = CMD_NORMAL;
      cpu_req_addr[i] = '0; cpu_req_wdata[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // processor 0 initialises the shared data in bypass mode
    begin
      logic [WORD_W-1:0] d;
      command(0, CMD_BYPASS);
      cpu(0, CPU_STORE, CMD_NORMAL, A_TURN, 0, d);
      cpu(0, CPU_STORE, CMD_NORMAL, A_S, 0, d);
      cpu(0, CPU_STORE, CMD_NORMAL, A_S2, 0, d);
      command(0, CMD_NORMAL);
    end
    fork
      proc(0);
      proc(1);
      proc(2);
      proc(3);
    join
    check(entries == N * ROUNDS, "all critical sections ran");
    // final values, read in bypass mode from main memory
    begin
      logic [WORD_W-1:0] s, s2;
      command(1, CMD_BYPASS);
      cpu(1, CPU_LOAD, CMD_NORMAL, A_S, '0, s);
      cpu(1, CPU_LOAD, CMD_NORMAL, A_S2, '0, s2);
      command(1, CMD_NORMAL);
      check(s == WORD_W'(N * ROUNDS), $sformatf("memory S=%0d", s));
      check(s2 == WORD_W'(3 * N * ROUNDS), $sformatf("memory S2=%0d", s2));
    end
    $display("events: hit=%0d miss=%0d copyback=%0d bypass=%0d shared_set=%0d save_line=%0d save=%0d bypass_mode_cycles=%0d shared_mode_cycles=%0d contention=%0d",
             n_hit, n_miss, n_wb, n_byp, n_sh, n_sl, n_sd, n_mode_byp, n_mode_sh, n_cont);
    check(n_hit > 0, "hit happened");
    check(n_miss > 0, "miss happened");
    check(n_wb > 0, "copy-back replacement happened");
    check(n_byp > 0, "bypass access happened");
    check(n_sh > 0, "shared tag set happened");
    check(n_sl >= 2 * N * ROUNDS, "Save copied the shared lines");
    check(n_sd == N * ROUNDS, "one Save per critical section");
    check(n_mode_byp > 0 && n_mode_sh > 0, "bypass and shared modes used");
    check(n_cont > 0, "contention for the memory path happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
