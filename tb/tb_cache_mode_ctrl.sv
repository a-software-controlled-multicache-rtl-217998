// Testbench of the cache operating-mode register.  Drives random sequences
// of Normal, Bypass, Shared and Save commands and Save-completion pulses,
// and compares the registered mode with a reference of the mode diagram:
// each mode command selects its mode, Save and a Save completion return to
// normal, and nothing else changes the mode.
module tb_cache_mode_ctrl;
  import mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid = 1'b0, save_done = 1'b0;
  cache_cmd_e  cmd = CMD_NORMAL;
  cache_mode_e mode_o;

  cache_mode_ctrl dut (.*);

  int checks = 0, failures = 0;
  cache_mode_e exp_mode;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (mode_o != MODE_NORMAL) begin failures++; $display("FAIL: reset mode"); end
    rst_n = 1'b1;
    exp_mode = MODE_NORMAL;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cmd_valid = ($urandom_range(0, 2) != 0);
      cmd       = cache_cmd_e'($urandom_range(0, 3));
      save_done = ($urandom_range(0, 9) == 0);
      if (cmd_valid) begin
        case (cmd)
          CMD_NORMAL: exp_mode = MODE_NORMAL;
          CMD_BYPASS: exp_mode = MODE_BYPASS;
          CMD_SHARED: exp_mode = MODE_SHARED;
          default:    exp_mode = MODE_NORMAL;
        endcase
      end
      if (save_done) exp_mode = MODE_NORMAL;
      @(negedge clk);
      cmd_valid = 1'b0; save_done = 1'b0;
      checks++;
      if (mode_o != exp_mode) begin
        failures++;
        $display("FAIL: step %0d mode %0d expected %0d", i, mode_o, exp_mode);
      end
      // hold: with no command the mode must not change
      @(negedge clk);
      checks++;
      if (mode_o != exp_mode) begin failures++; $display("FAIL: mode drifted"); end
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
