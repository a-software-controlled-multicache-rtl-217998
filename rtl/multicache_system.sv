// Tightly-coupled multiprocessor memory system with software-controlled
// cache coherence.
//
// Each of the N_CPU processors owns a private copy-back cache; all caches
// reach one shared main memory through an interconnection network.  There
// is no path between the caches: coherence of shared data comes from cache
// commands that the program passes to its cache (Shared before touching
// shared data inside a critical section, Save when leaving it, Bypass and
// Normal around semaphore accesses).  This organisation is the protocol's;
// the sizes, the single arbitrated memory path and the handshakes are this
// design's choices.
//
// The processors are outside this module: for processor i, the cpu_* ports
// at index i are the processor side of cache i (see cache_controller for the
// handshake and timing).  mode and events expose each cache's operating
// mode and one-cycle event pulses; mem_contention pulses when a cache waits
// for the memory path.
module multicache_system
  import mc_pkg::*;
#(
  parameter int unsigned N_CPU      = mc_pkg::N_CPU_DEF,
  parameter int unsigned WORD_W     = mc_pkg::WORD_W_DEF,
  parameter int unsigned ADDR_W     = mc_pkg::ADDR_W_DEF,
  parameter int unsigned LINE_WORDS = mc_pkg::LINE_WORDS_DEF,
  parameter int unsigned SETS       = mc_pkg::SETS_DEF,
  parameter int unsigned WAYS       = mc_pkg::WAYS_DEF,
  parameter int unsigned MEM_LAT    = mc_pkg::MEM_LAT_DEF,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side of every cache
  input  logic [N_CPU-1:0]  cpu_req_valid,
  output logic [N_CPU-1:0]  cpu_req_ready,
  input  cpu_op_e           cpu_req_op    [N_CPU],
  input  cache_cmd_e        cpu_req_cmd   [N_CPU],
  input  logic [ADDR_W-1:0] cpu_req_addr  [N_CPU],
  input  logic [WORD_W-1:0] cpu_req_wdata [N_CPU],
  output logic [N_CPU-1:0]  cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata [N_CPU],
  // observation
  output cache_mode_e       mode   [N_CPU],
  output cache_events_t     events [N_CPU],
  output logic              mem_contention
);

  localparam int unsigned LINE_W = WORD_W * LINE_WORDS;

  logic [N_CPU-1:0]  c_req_valid, c_resp_valid;
  mem_op_e           c_req_op    [N_CPU];
  logic [ADDR_W-1:0] c_req_addr  [N_CPU];
  logic [LINE_W-1:0] c_req_wdata [N_CPU];
  logic [LINE_W-1:0] c_resp_rdata;

  logic              m_req_valid, m_resp_valid;
  mem_op_e           m_req_op;
  logic [ADDR_W-1:0] m_req_addr;
  logic [LINE_W-1:0] m_req_wdata, m_resp_rdata;

  for (genvar i = 0; i < N_CPU; i++) begin : g_cpu
    coherent_cache #(
      .WORD_W(WORD_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
      .SETS(SETS), .WAYS(WAYS)
    ) u_cache (
      .clk, .rst_n,
      .cpu_req_valid  (cpu_req_valid[i]),
      .cpu_req_ready  (cpu_req_ready[i]),
      .cpu_req_op     (cpu_req_op[i]),
      .cpu_req_cmd    (cpu_req_cmd[i]),
      .cpu_req_addr   (cpu_req_addr[i]),
      .cpu_req_wdata  (cpu_req_wdata[i]),
      .cpu_resp_valid (cpu_resp_valid[i]),
      .cpu_resp_rdata (cpu_resp_rdata[i]),
      .mem_req_valid  (c_req_valid[i]),
      .mem_req_op     (c_req_op[i]),
      .mem_req_addr   (c_req_addr[i]),
      .mem_req_wdata  (c_req_wdata[i]),
      .mem_resp_valid (c_resp_valid[i]),
      .mem_resp_rdata (c_resp_rdata),
      .mode           (mode[i]),
      .events         (events[i])
    );
  end

  mem_interconnect #(
    .N_CPU(N_CPU), .ADDR_W(ADDR_W), .LINE_W(LINE_W)
  ) u_net (
    .clk, .rst_n,
    .c_req_valid, .c_req_op, .c_req_addr, .c_req_wdata,
    .c_resp_valid, .c_resp_rdata,
    .m_req_valid, .m_req_op, .m_req_addr, .m_req_wdata,
    .m_resp_valid, .m_resp_rdata,
    .contention (mem_contention)
  );

  shared_memory #(
    .ADDR_W(ADDR_W), .WORD_W(WORD_W), .LINE_WORDS(LINE_WORDS),
    .MEM_LAT(MEM_LAT), .INIT_FILE(INIT_FILE)
  ) u_mem (
    .clk, .rst_n,
    .m_req_valid, .m_req_op, .m_req_addr, .m_req_wdata,
    .m_resp_valid, .m_resp_rdata
  );

endmodule
