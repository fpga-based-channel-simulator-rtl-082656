// channel_simulator: real-time channel simulator of a wireless network emulator.
//
// Each of N_NODES radios delivers 12-bit samples at 180 MHz (adc_in) and
// receives 14-bit samples (dac_out). Output k is the tapped-delay-line sum
//   y_k(t) = sum over i != k, over taps j of  a_ijk * x_i(t - tau_j)
// built from hardware paths, one per tap: a block-RAM delay (tau, in samples),
// a multiplier with an 8-bit scale value, a right shift of 0..14 bits and
// truncation to 14 bits, then a 14-bit adder per destination. With the default
// 15 nodes there are 210 channels; 202 have a single path without delay memory
// and N_MULTI = 8 have TAPS_MULTI = 3 delayed paths, 226 paths (226 multipliers,
// 24 delay memories) in all. Multipath channel m runs from node (m+1) % N_NODES
// to node m (see chsim_pkg for the path numbering).
//
// Path settings are written one path per clock through the cfg_* port (from
// the Ethernet-side update logic) and take effect on the next clock.
//
// Timing: adc_in is registered on entry; dac_out[k] carries the sum of the
// contributions of x_i delayed by cfg.delay + 4 + ADD_LAT clocks, where
// ADD_LAT = ceil(log2(number of paths into node k)) (4 at the defaults), so an
// undelayed path takes 8 clocks (44 ns). Node count, path counts, widths and
// the delay memory size follow the paper; the choice of multipath channels,
// the input register and the update port format are this design's choices.
module channel_simulator
  import chsim_pkg::*;
#(
  parameter int unsigned N_NODES    = 15,
  parameter int unsigned N_MULTI    = 8,
  parameter int unsigned TAPS_MULTI = 3,
  parameter int unsigned DEPTH      = 1536,
  localparam int unsigned N_PATHS   = n_paths(N_NODES, N_MULTI, TAPS_MULTI),
  localparam int unsigned PID_W     = (N_PATHS > 1) ? $clog2(N_PATHS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // node samples
  input  sample_t          adc_in  [N_NODES],
  output dac_t             dac_out [N_NODES],
  // path updates
  input  logic             cfg_wr_en,
  input  logic [PID_W-1:0] cfg_wr_path,
  input  path_cfg_t        cfg_wr_data
);

  sample_t   x_q      [N_NODES];
  path_cfg_t cfg      [N_PATHS];
  dac_t      path_out [N_PATHS];

  // Input registers (one per node port).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_q <= '{default: '0};
    else        x_q <= adc_in;
  end

  path_config_regs #(.N_PATHS(N_PATHS), .PID_W(PID_W)) u_cfg (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (cfg_wr_en),
    .wr_path (cfg_wr_path),
    .wr_data (cfg_wr_data),
    .cfg     (cfg)
  );

  for (genvar p = 0; p < N_PATHS; p++) begin : g_path
    localparam int unsigned SRC = path_src(p, N_NODES, TAPS_MULTI);
    channel_path #(
      .HAS_DELAY (path_has_delay(p, N_NODES, N_MULTI)),
      .DEPTH     (DEPTH)
    ) u_path (
      .clk   (clk),
      .rst_n (rst_n),
      .din   (x_q[SRC]),
      .cfg   (cfg[p]),
      .dout  (path_out[p])
    );
  end

  for (genvar k = 0; k < N_NODES; k++) begin : g_dst
    localparam int unsigned NIN = dst_n_in(k, N_NODES, N_MULTI, TAPS_MULTI);
    dac_t sum_in [NIN];
    for (genvar j = 0; j < NIN; j++) begin : g_in
      assign sum_in[j] = path_out[dst_path(k, j, N_NODES, TAPS_MULTI)];
    end
    path_adder #(.N_IN(NIN), .W(DAC_W)) u_sum (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (sum_in),
      .dout (dac_out[k])
    );
  end

  // The multipath channels must end at distinct nodes.
  initial begin
    assert (N_MULTI < N_NODES) else $fatal(1, "N_MULTI must be below N_NODES");
    assert (TAPS_MULTI >= 1)   else $fatal(1, "TAPS_MULTI must be at least 1");
  end

endmodule
