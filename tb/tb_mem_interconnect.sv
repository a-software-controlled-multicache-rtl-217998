// Testbench of the interconnection network with four caches.  Each
// requester model raises random requests and holds them until its
// acknowledgement; a memory model accepts a request whenever it is idle and
// answers after a random delay with data computed from the request.
// Checked: the forwarded request is that of the round-robin winner (first
// requester after the one served last), only the owner gets the
// acknowledgement, the data it gets belongs to its own request, every
// request is served, and contention is flagged when a request waits.
module tb_mem_interconnect;
  import mc_pkg::*;
  localparam int unsigned N = 4, ADDR_W = 12, LINE_W = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      c_req_valid = '0, c_resp_valid;
  mem_op_e           c_req_op    [N];
  logic [ADDR_W-1:0] c_req_addr  [N];
  logic [LINE_W-1:0] c_req_wdata [N];
  logic [LINE_W-1:0] c_resp_rdata;
  logic              m_req_valid, m_resp_valid;
  mem_op_e           m_req_op;
  logic [ADDR_W-1:0] m_req_addr;
  logic [LINE_W-1:0] m_req_wdata, m_resp_rdata;
  logic              contention;

  mem_interconnect #(.N_CPU(N), .ADDR_W(ADDR_W), .LINE_W(LINE_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [LINE_W-1:0] answer(logic [ADDR_W-1:0] a, logic [LINE_W-1:0] wd);
    return {wd[LINE_W-1:ADDR_W], a} ^ {4{32'h9E37_79B9}};
  endfunction

  // memory model
  int m_state = 0, m_wait = 0;
  logic [LINE_W-1:0] m_data = '0;
  int last = N - 1;
  int accepted = 0, n_cont = 0;
  assign m_resp_valid = (m_state == 2);
  assign m_resp_rdata = m_data;
  always @(posedge clk) begin
    if (!rst_n) m_state <= 0;
    else begin
      n_cont += int'(contention);
      if (m_state == 0 && m_req_valid) begin
        // expected round-robin winner
        int exp_w;
        exp_w = -1;
        for (int k = 1; k <= N; k++)
          if (exp_w < 0 && c_req_valid[(last + k) % N]) exp_w = (last + k) % N;
        check(exp_w >= 0, "memory request with no requester");
        if (exp_w >= 0) begin
          check(m_req_addr == c_req_addr[exp_w] && m_req_op == c_req_op[exp_w] &&
                m_req_wdata == c_req_wdata[exp_w], $sformatf("forwarded request of cache %0d", exp_w));
          check(contention == ($countones(c_req_valid) > 1), "contention flag");
          last = exp_w;
        end
        accepted++;
        m_data  <= answer(m_req_addr, m_req_wdata);
        m_wait  <= $urandom_range(0, 4);
        m_state <= 1;
      end else if (m_state == 1) begin
        if (m_wait == 0) m_state <= 2; else m_wait <= m_wait - 1;
      end else if (m_state == 2) m_state <= 0;
    end
  end

  int served [N];
  task automatic requester(input int id, input int count);
    for (int i = 0; i < count; i++) begin
      logic [ADDR_W-1:0] a;
      logic [LINE_W-1:0] wd;
      repeat ($urandom_range(0, 6)) @(negedge clk);
      a  = ADDR_W'($urandom);
      wd = {$urandom, $urandom, $urandom, $urandom};
      c_req_valid[id] = 1'b1;
      c_req_op[id] = mem_op_e'($urandom_range(0, 3));
      c_req_addr[id] = a; c_req_wdata[id] = wd;
      @(negedge clk);
      while (!c_resp_valid[id]) @(negedge clk);
      check(c_resp_rdata == answer(a, wd), $sformatf("cache %0d got its own data", id));
      check($countones(c_resp_valid) == 1, "acknowledgement to one cache only");
      served[id]++;
      @(negedge clk);
      c_req_valid[id] = 1'b0;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      c_req_op[i] = MEM_RD_LINE; c_req_addr[i] = '0; c_req_wdata[i] = '0; served[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      requester(0, 150);
      requester(1, 150);
      requester(2, 150);
      requester(3, 150);
    join
    for (int i = 0; i < N; i++) check(served[i] == 150, "all requests served");
    check(accepted == 600, "one memory transfer per request");
    check(n_cont > 0, "contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
