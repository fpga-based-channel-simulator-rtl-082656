// path_config_regs: the settings of every path (delay, scale, shift).
//
// The emulator controller computes path losses and delays and sends them,
// through an auxiliary Ethernet FPGA, as update messages; this block holds the
// current value of each path. One message writes one path's whole record:
// when wr_en is high at a rising clock edge, record wr_data is stored for path
// wr_path and drives that path from the next clock on. Paths can be rewritten
// at any time, so fading can be played back by streaming updates; a full
// update of all 226 paths takes 226 clocks (1.3 us at 180 MHz). Reset clears
// every record (scale 0), so all paths are silent until programmed. Writes to
// a path number at or above N_PATHS change nothing and trip an assertion.
//
// That paths are updated by messages from the Ethernet side follows the paper;
// the message format, the single-clock write and the reset value are this
// design's choices.
module path_config_regs
  import chsim_pkg::*;
#(
  parameter int unsigned N_PATHS = 226,
  parameter int unsigned PID_W   = (N_PATHS > 1) ? $clog2(N_PATHS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [PID_W-1:0] wr_path,
  input  path_cfg_t        wr_data,
  output path_cfg_t        cfg [N_PATHS]
);

  for (genvar p = 0; p < N_PATHS; p++) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                  cfg[p] <= '0;
      else if (wr_en && wr_path == PID_W'(p))      cfg[p] <= wr_data;
    end
  end

  // A message must name an existing path.
  a_path_in_range: assert property (@(posedge clk) wr_en |-> (32'(wr_path) < N_PATHS))
    else $error("path_config_regs: update for nonexistent path %0d", wr_path);

endmodule
