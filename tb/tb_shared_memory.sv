// Testbench of the shared main memory.  Random line and word reads and
// writes are issued with the request/acknowledge handshake and mirrored in
// a reference word array; read data and the time from request to
// acknowledgement (MEM_LAT + 2 cycles, counting both ends) are checked.
module tb_shared_memory;
  import mc_pkg::*;
  localparam int unsigned ADDR_W = 8, WORD_W = 32, LW = 4, LAT = 3;
  localparam int unsigned LINE_W = WORD_W * LW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              m_req_valid = 1'b0, m_resp_valid;
  mem_op_e           m_req_op = MEM_RD_LINE;
  logic [ADDR_W-1:0] m_req_addr = '0;
  logic [LINE_W-1:0] m_req_wdata = '0, m_resp_rdata;

  shared_memory #(.ADDR_W(ADDR_W), .WORD_W(WORD_W), .LINE_WORDS(LW), .MEM_LAT(LAT)) dut (.*);

  logic [WORD_W-1:0] ref_m [2**ADDR_W];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input mem_op_e op, input logic [ADDR_W-1:0] a,
                      input logic [LINE_W-1:0] wd, output logic [LINE_W-1:0] rd);
    int c0;
    @(negedge clk);
    m_req_valid = 1'b1; m_req_op = op; m_req_addr = a; m_req_wdata = wd;
    c0 = cyc;
    while (!m_resp_valid) @(negedge clk);
    rd = m_resp_rdata;
    check(cyc - c0 + 1 == LAT + 2, $sformatf("transfer pending %0d cycles", cyc - c0 + 1));
    @(negedge clk);
    m_req_valid = 1'b0;
  endtask

  initial begin
    logic [LINE_W-1:0] rd, wd;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 2**ADDR_W / LW; l++) begin
      wd = {$urandom, $urandom, $urandom, $urandom};
      xfer(MEM_WR_LINE, ADDR_W'(l * LW), wd, rd);
      for (int w = 0; w < LW; w++) ref_m[l * LW + w] = wd[w*WORD_W +: WORD_W];
    end
    for (int i = 0; i < 600; i++) begin
      mem_op_e op;
      logic [ADDR_W-1:0] a;
      op = mem_op_e'($urandom_range(0, 3));
      a  = ADDR_W'($urandom);
      wd = {$urandom, $urandom, $urandom, $urandom};
      xfer(op, a, wd, rd);
      case (op)
        MEM_RD_LINE: for (int w = 0; w < LW; w++)
          check(rd[w*WORD_W +: WORD_W] == ref_m[(a & ~ADDR_W'(LW - 1)) + w], "line read");
        MEM_WR_LINE: for (int w = 0; w < LW; w++)
          ref_m[(a & ~ADDR_W'(LW - 1)) + w] = wd[w*WORD_W +: WORD_W];
        MEM_RD_WORD: check(rd[WORD_W-1:0] == ref_m[a], "word read");
        MEM_WR_WORD: ref_m[a] = wd[WORD_W-1:0];
      endcase
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
