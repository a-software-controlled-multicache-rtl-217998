// Testbench of the cache data array.  Random whole-line and single-word
// writes to random (set, way) pairs are mirrored in a reference array, and
// every line is read back through the combinational read port and compared.
module tb_cache_data_store;
  localparam int unsigned WORD_W = 32, LINE_WORDS = 4, SETS = 16, WAYS = 2;
  localparam int unsigned LINE_W = WORD_W * LINE_WORDS;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]        rd_set = '0, wr_set = '0;
  logic [0:0]        rd_way = '0, wr_way = '0;
  logic [LINE_W-1:0] rd_line, wr_line = '0;
  logic              wr_line_en = 1'b0, wr_word_en = 1'b0;
  logic [1:0]        wr_off = '0;
  logic [WORD_W-1:0] wr_word = '0;

  cache_data_store #(.WORD_W(WORD_W), .LINE_WORDS(LINE_WORDS), .SETS(SETS), .WAYS(WAYS)) dut (.*);

  logic [LINE_W-1:0] ref_m [SETS][WAYS];
  int checks = 0, failures = 0;

  task automatic check_all();
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        rd_set = 4'(s); rd_way = 1'(w);
        #1;
        checks++;
        if (rd_line != ref_m[s][w]) begin
          failures++;
          $display("FAIL: line %0d/%0d %h expected %h", s, w, rd_line, ref_m[s][w]);
        end
      end
  endtask

  initial begin
    // fill every line first
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        @(negedge clk);
        wr_line_en = 1'b1; wr_set = 4'(s); wr_way = 1'(w);
        wr_line = {$urandom, $urandom, $urandom, $urandom};
        ref_m[s][w] = wr_line;
      end
    @(negedge clk);
    wr_line_en = 1'b0;
    check_all();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_set = 4'($urandom_range(0, SETS - 1));
      wr_way = 1'($urandom_range(0, WAYS - 1));
      wr_off = 2'($urandom_range(0, LINE_WORDS - 1));
      wr_word = $urandom;
      wr_line = {$urandom, $urandom, $urandom, $urandom};
      wr_line_en = ($urandom_range(0, 3) == 0);
      wr_word_en = ($urandom_range(0, 1) == 0);
      if (wr_line_en) ref_m[wr_set][wr_way] = wr_line;
      else if (wr_word_en) ref_m[wr_set][wr_way][wr_off*WORD_W +: WORD_W] = wr_word;
      @(negedge clk);
      wr_line_en = 1'b0; wr_word_en = 1'b0;
      if (i % 50 == 0) check_all();
      rd_set = wr_set; rd_way = wr_way;
      #1;
      checks++;
      if (rd_line != ref_m[wr_set][wr_way]) begin failures++; $display("FAIL: after write %0d", i); end
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
