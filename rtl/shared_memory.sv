// Shared main memory of the multiprocessor.
//
// It holds 2**ADDR_W words, stored as lines of LINE_WORDS words, and serves
// one request at a time: read or write of a whole line (cache fills,
// copy-back and Save) and read or write of a single word (bypass-mode
// accesses).  A request is taken in the first cycle it is presented while
// the memory is idle; MEM_LAT cycles later the access is made, and in the
// following cycle m_resp_valid pulses for one cycle with the read data
// (line reads: the whole line; word reads: the word in the lowest lane).
// So a transfer is pending for MEM_LAT + 2 cycles, counting the cycle it is
// taken and the acknowledgement cycle.  Size and latency are this design's
// choices.  Contents are not reset; initialise them through the
// INIT_FILE parameter ($readmemh, one line per entry) or by writes.
module shared_memory
  import mc_pkg::*;
#(
  parameter int unsigned ADDR_W     = mc_pkg::ADDR_W_DEF,
  parameter int unsigned WORD_W     = mc_pkg::WORD_W_DEF,
  parameter int unsigned LINE_WORDS = mc_pkg::LINE_WORDS_DEF,
  parameter int unsigned MEM_LAT    = mc_pkg::MEM_LAT_DEF,
  parameter string       INIT_FILE  = "",
  localparam int unsigned LINE_W = WORD_W * LINE_WORDS,
  localparam int unsigned OFF_W  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1,
  localparam int unsigned LINES  = (2 ** ADDR_W) / LINE_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              m_req_valid,
  input  mem_op_e           m_req_op,
  input  logic [ADDR_W-1:0] m_req_addr,
  input  logic [LINE_W-1:0] m_req_wdata,
  output logic              m_resp_valid,
  output logic [LINE_W-1:0] m_resp_rdata
);

  localparam int unsigned CNT_W = (MEM_LAT > 1) ? $clog2(MEM_LAT + 1) : 1;

  typedef enum logic [1:0] { M_IDLE, M_BUSY, M_RESP } mstate_e;

  logic [LINE_W-1:0] mem [LINES];

  mstate_e           st_q;
  logic [CNT_W-1:0]  cnt_q;
  mem_op_e           op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [LINE_W-1:0] wdata_q;
  logic [LINE_W-1:0] rdata_q;

  logic [ADDR_W-OFF_W-1:0] line_idx;
  logic [OFF_W-1:0]        word_off;
  assign line_idx = addr_q[ADDR_W-1:OFF_W];
  assign word_off = (LINE_WORDS > 1) ? addr_q[OFF_W-1:0] : '0;

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= M_IDLE;
      cnt_q   <= '0;
      op_q    <= MEM_RD_LINE;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
    end else begin
      unique case (st_q)
        M_IDLE: if (m_req_valid) begin
          op_q    <= m_req_op;
          addr_q  <= m_req_addr;
          wdata_q <= m_req_wdata;
          cnt_q   <= CNT_W'(MEM_LAT - 1);
          st_q    <= M_BUSY;
        end
        M_BUSY: begin
          if (cnt_q == '0) begin
            unique case (op_q)
              MEM_RD_LINE: rdata_q <= mem[line_idx];
              MEM_RD_WORD: rdata_q <= LINE_W'(mem[line_idx][word_off*WORD_W +: WORD_W]);
              default:     rdata_q <= '0;
            endcase
            st_q <= M_RESP;
          end else begin
            cnt_q <= cnt_q - 1'b1;
          end
        end
        M_RESP:  st_q <= M_IDLE;
        default: st_q <= M_IDLE;
      endcase
    end
  end

  // array writes, kept apart from the reset logic so the array stays a memory
  always_ff @(posedge clk) begin
    if (st_q == M_BUSY && cnt_q == '0) begin
      if (op_q == MEM_WR_LINE)
        mem[line_idx] <= wdata_q;
      else if (op_q == MEM_WR_WORD)
        mem[line_idx][word_off*WORD_W +: WORD_W] <= wdata_q[WORD_W-1:0];
    end
  end

  assign m_resp_valid = (st_q == M_RESP);
  assign m_resp_rdata = rdata_q;

endmodule
