// Interconnection network between the N_CPU private caches and the shared
// main memory.
//
// The caches share one path to memory.  While the path is free, a
// round-robin arbiter picks one requesting cache, starting after the cache
// served last, and forwards its request in the same cycle.  The winner owns
// the path until the memory's one-cycle acknowledgement, which is routed
// back to it alone; the next arbitration happens in the following cycle.
// A single arbitrated path and round-robin order are this design's choices:
// the protocol only asks for some network between caches and memory, and
// needs no path between the caches themselves.
//
// Each side uses the request/acknowledge handshake of the caches: a request
// is held stable until its acknowledgement.  The memory must accept a
// request in the cycle it is first presented whenever no transfer is
// pending (shared_memory does).
module mem_interconnect
  import mc_pkg::*;
#(
  parameter int unsigned N_CPU  = mc_pkg::N_CPU_DEF,
  parameter int unsigned ADDR_W = mc_pkg::ADDR_W_DEF,
  parameter int unsigned LINE_W = mc_pkg::WORD_W_DEF * mc_pkg::LINE_WORDS_DEF,
  localparam int unsigned ID_W  = (N_CPU > 1) ? $clog2(N_CPU) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // cache side
  input  logic [N_CPU-1:0]  c_req_valid,
  input  mem_op_e           c_req_op    [N_CPU],
  input  logic [ADDR_W-1:0] c_req_addr  [N_CPU],
  input  logic [LINE_W-1:0] c_req_wdata [N_CPU],
  output logic [N_CPU-1:0]  c_resp_valid,
  output logic [LINE_W-1:0] c_resp_rdata,
  // memory side
  output logic              m_req_valid,
  output mem_op_e           m_req_op,
  output logic [ADDR_W-1:0] m_req_addr,
  output logic [LINE_W-1:0] m_req_wdata,
  input  logic              m_resp_valid,
  input  logic [LINE_W-1:0] m_resp_rdata,
  // observation: a request waited for the path this cycle
  output logic              contention
);

  logic            busy_q;
  logic [ID_W-1:0] owner_q, last_q;
  logic            win_valid;
  logic [ID_W-1:0] win;
  logic [ID_W-1:0] sel;

  // round-robin choice, starting after the last cache served
  always_comb begin
    win_valid = 1'b0;
    win       = '0;
    for (int k = 1; k <= N_CPU; k++) begin
      logic [ID_W-1:0] c;
      c = ID_W'((int'(last_q) + k) % N_CPU);
      if (!win_valid && c_req_valid[c]) begin
        win_valid = 1'b1;
        win       = ID_W'(c);
      end
    end
  end

  assign sel         = busy_q ? owner_q : win;
  assign m_req_valid = busy_q ? c_req_valid[owner_q] : win_valid;
  assign m_req_op    = c_req_op[sel];
  assign m_req_addr  = c_req_addr[sel];
  assign m_req_wdata = c_req_wdata[sel];

  always_comb begin
    c_resp_valid = '0;
    if (busy_q && m_resp_valid) c_resp_valid[owner_q] = 1'b1;
  end
  assign c_resp_rdata = m_resp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= ID_W'(N_CPU - 1);
    end else if (busy_q) begin
      if (m_resp_valid) busy_q <= 1'b0;
    end else if (win_valid) begin
      busy_q  <= 1'b1;
      owner_q <= win;
      last_q  <= win;
    end
  end

  always_comb begin
    contention = 1'b0;
    for (int c = 0; c < N_CPU; c++)
      if (c_req_valid[c] && !(busy_q ? (owner_q == ID_W'(c)) : (win == ID_W'(c))))
        contention = 1'b1;
  end

  // The owner keeps its request up until the acknowledgement.
  a_owner_holds: assert property (@(posedge clk) disable iff (!rst_n)
    busy_q |-> c_req_valid[owner_q])
    else $error("cache dropped its memory request before the acknowledgement");

endmodule
