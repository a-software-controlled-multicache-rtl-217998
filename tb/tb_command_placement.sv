// Workload testbench: where the cache commands are placed, and what that
// costs, on the full system at its default parameters.
//
// A critical section touches K shared items, each on a line of its own, and
// M private lines.  It is run in the two placements the protocol weighs:
//   A. Shared ... Normal around the shared accesses only: Save at the exit
//      writes the K shared lines.
//   B. Shared issued once at entry (inside Wait), nothing until Save: every
//      line touched in the section is shared, so Save writes K + M lines.
// Save must take 2 + n*(1 + T) cycles for n saved lines, where T = MEM_LAT
// + 2 is one uncontended memory transfer; placement B needs no Normal
// command after the shared accesses.
// A third part reproduces the hazard that forces one shared item per line:
// when a shared item S and a private item D sit on the same line, another
// processor's saved update of S is overwritten by the stale copy when the
// line holding D is later replaced.  With S and D on separate lines the
// update survives.
module tb_command_placement;
  import mc_pkg::*;

  localparam int unsigned N = mc_pkg::N_CPU_DEF;
  localparam int unsigned WORD_W = mc_pkg::WORD_W_DEF;
  localparam int unsigned ADDR_W = mc_pkg::ADDR_W_DEF;
  localparam int unsigned LW = mc_pkg::LINE_WORDS_DEF;
  localparam int unsigned SETS = mc_pkg::SETS_DEF;
  localparam int unsigned T = mc_pkg::MEM_LAT_DEF + 2;
  localparam int K = 3, M = 4;

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
    if (!ok) begin failures++; $display("FAIL [%0d]: %s", cyc, what); end
  endtask

  int n_saved = 0, n_cmds = 0;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) n_saved += int'(events[i].save_line);

  int last_lat;
  task automatic cpu(input int id, input cpu_op_e op, input cache_cmd_e c,
                     input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd,
                     output logic [WORD_W-1:0] rd);
    int c0;
    if (op == CPU_CMD) n_cmds++;
    @(negedge clk);
    cpu_req_valid[id] = 1'b1; cpu_req_op[id] = op; cpu_req_cmd[id] = c;
    cpu_req_addr[id] = a; cpu_req_wdata[id] = wd;
    while (!cpu_req_ready[id]) @(negedge clk);
    c0 = cyc;
    @(negedge clk);
    cpu_req_valid[id] = 1'b0;
    while (!cpu_resp_valid[id]) @(negedge clk);
    rd = cpu_resp_rdata[id];
    last_lat = cyc - c0;
  endtask
  task automatic command(input int id, input cache_cmd_e c);
    logic [WORD_W-1:0] d;
    cpu(id, CPU_CMD, c, '0, '0, d);
  endtask
  task automatic ld(input int id, input logic [ADDR_W-1:0] a, output logic [WORD_W-1:0] v);
    cpu(id, CPU_LOAD, CMD_NORMAL, a, '0, v);
  endtask
  task automatic st(input int id, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] d;
    cpu(id, CPU_STORE, CMD_NORMAL, a, v, d);
  endtask

  // shared items: one line each, sets 1..K; private lines: sets 8..8+M-1
  function automatic logic [ADDR_W-1:0] sh_item(int j);
    return ADDR_W'(12'h100 + (1 + j) * LW);
  endfunction
  function automatic logic [ADDR_W-1:0] pv_item(int j);
    return ADDR_W'(12'h200 + (8 + j) * LW + 1);
  endfunction

  // one critical section on processor 0; returns Save latency and lines saved
  task automatic section(input bit whole_in_shared, input int round,
                         output int save_lat, output int saved, output int cmds);
    logic [WORD_W-1:0] v;
    int s0, c0;
    c0 = n_cmds;
    // Wait: semaphore accessed in bypass mode
    command(0, CMD_BYPASS);
    ld(0, ADDR_W'(12'h000), v);
    st(0, ADDR_W'(12'h000), 0);
    command(0, CMD_NORMAL);
    if (whole_in_shared) command(0, CMD_SHARED);
    for (int j = 0; j < M; j++) st(0, pv_item(j), WORD_W'(round * 100 + j));
    if (!whole_in_shared) command(0, CMD_SHARED);
    for (int j = 0; j < K; j++) begin
      ld(0, sh_item(j), v);
      st(0, sh_item(j), v + 1);
    end
    if (!whole_in_shared) command(0, CMD_NORMAL);
    // Signal: Save, then release the semaphore in bypass mode
    s0 = n_saved;
    command(0, CMD_SAVE);
    save_lat = last_lat;
    repeat (2) @(posedge clk);
    saved = n_saved - s0;
    command(0, CMD_BYPASS);
    st(0, ADDR_W'(12'h000), 1);
    command(0, CMD_NORMAL);
    cmds = n_cmds - c0;
  endtask

  initial begin
    int lat_a, lat_b, sv_a, sv_b, cm_a, cm_b;
    logic [WORD_W-1:0] v;
    for (int i = 0; i < N; i++) begin
      cpu_req_op[i] = CPU_LOAD; cpu_req_cmd[i] = CMD_NORMAL;
      cpu_req_addr[i] = '0; cpu_req_wdata[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // initialise semaphore and shared items in memory through bypass mode
    command(1, CMD_BYPASS);
    st(1, ADDR_W'(12'h000), 1);
    for (int j = 0; j < K; j++) st(1, sh_item(j), WORD_W'(10 * j));
    command(1, CMD_NORMAL);

    // ---- placement A, then placement B ----
    section(1'b0, 1, lat_a, sv_a, cm_a);
    section(1'b1, 2, lat_b, sv_b, cm_b);
    $display("placement A: Save wrote %0d lines in %0d cycles, %0d commands", sv_a, lat_a, cm_a);
    $display("placement B: Save wrote %0d lines in %0d cycles, %0d commands", sv_b, lat_b, cm_b);
    check(sv_a == K, "A: Save writes only the shared lines");
    check(lat_a == 2 + K * (1 + T), $sformatf("A: Save time %0d", lat_a));
    check(sv_b == K + M, "B: Save writes every line of the section");
    check(lat_b == 2 + (K + M) * (1 + T), $sformatf("B: Save time %0d", lat_b));
    check(cm_b == cm_a - 1, "B needs no Normal command after the shared accesses");
    // both placements left the right values in memory
    command(2, CMD_BYPASS);
    for (int j = 0; j < K; j++) begin
      ld(2, sh_item(j), v);
      check(v == WORD_W'(10 * j + 2), $sformatf("shared item %0d in memory = %0d", j, v));
    end
    for (int j = 0; j < M; j++) begin
      ld(2, pv_item(j), v);
      check(v == WORD_W'(200 + j), "B: private line copied out by Save");
    end
    command(2, CMD_NORMAL);

    // ---- shared and private item on one line ----
    begin
      logic [ADDR_W-1:0] a_s, a_d;
      // S and D in the same line (set 5)
      a_s = ADDR_W'(12'h300 + 5 * LW);
      a_d = a_s + 1;
      hazard(a_s, a_d, 1'b1);
      // S and D on different lines (sets 6 and 7)
      a_s = ADDR_W'(12'h300 + 6 * LW);
      a_d = ADDR_W'(12'h300 + 7 * LW);
      hazard(a_s, a_d, 1'b0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor 0 (p_u) uses D in normal mode; processor 1 (p_v) updates S in
  // a critical section and saves it; later p_u's line holding D is replaced
  task automatic hazard(input logic [ADDR_W-1:0] a_s, input logic [ADDR_W-1:0] a_d,
                        input bit same_line);
    logic [WORD_W-1:0] v;
    command(3, CMD_BYPASS);
    st(3, a_s, 32'd500);
    command(3, CMD_NORMAL);
    ld(0, a_d, v);                      // p_u caches the line of D
    command(1, CMD_SHARED);             // p_v: critical section on S
    ld(1, a_s, v);
    check(v == 32'd500, "p_v reads S");
    st(1, a_s, 32'd501);
    command(1, CMD_SAVE);               // S = 501 now in memory
    st(0, a_d, 32'd7);                  // p_u writes D: line dirty
    // evict p_u's line holding D: two more tags in the same set
    ld(0, a_d + ADDR_W'(SETS * LW), v);
    ld(0, a_d + ADDR_W'(2 * SETS * LW), v);
    command(3, CMD_BYPASS);
    ld(3, a_s, v);
    command(3, CMD_NORMAL);
    if (same_line)
      check(v == 32'd500, $sformatf("same line: stale copy-back overwrote S (S=%0d)", v));
    else
      check(v == 32'd501, $sformatf("separate lines: S keeps the saved update (S=%0d)", v));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
