// Operating-mode register of one cache.
//
// The cache is always in one of three modes: normal (ordinary cached
// access), bypass (accesses go to main memory only) and shared (cached
// accesses that also set the line's shared tag).  The Normal, Bypass and
// Shared commands move the cache to the mode of the same name from any
// mode; the Save command returns it to normal mode.  That transition set
// follows the protocol.  Reset into normal mode is this design's choice.
//
// Interface: cmd_valid/cmd carry a mode-changing command for one cycle;
// save_done pulses when a Save command finishes (the cache controller
// applies Save's mode change at its end).  mode_o is registered: the new
// mode is visible the cycle after the command.
module cache_mode_ctrl
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  cache_cmd_e  cmd,
  input  logic        save_done,
  output cache_mode_e mode_o
);

  cache_mode_e mode_q, mode_d;

  always_comb begin
    mode_d = mode_q;
    if (cmd_valid) begin
      unique case (cmd)
        CMD_NORMAL: mode_d = MODE_NORMAL;
        CMD_BYPASS: mode_d = MODE_BYPASS;
        CMD_SHARED: mode_d = MODE_SHARED;
        CMD_SAVE:   mode_d = MODE_NORMAL;
      endcase
    end
    if (save_done) mode_d = MODE_NORMAL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_NORMAL;
    else        mode_q <= mode_d;
  end

  assign mode_o = mode_q;

endmodule
