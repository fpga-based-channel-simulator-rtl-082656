// channel_path: one hardware path of the tapped-delay-line model.
//
// The source node's 12-bit sample goes through a block-RAM delay line and then
// the path scaler (multiplier, bit shift, truncation to 14 bits), producing
// this path's contribution to a destination node's sum. Paths of single-path
// channels have no delay memory (HAS_DELAY = 0), as in the paper's design,
// where those channels save the block RAM; a single register then stands in
// for the memory's read register, so every path has the same base latency.
//
// Timing: dout is din delayed by cfg.delay + 3 clocks (1 for the memory or its
// stand-in register, 2 in the scaler); cfg.delay is ignored without a memory.
// Both the optional memory and the shared latency are as described above; the
// matching register is this design's choice.
module channel_path
  import chsim_pkg::*;
#(
  parameter bit          HAS_DELAY = 1'b1,
  parameter int unsigned DEPTH     = 1536
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sample_t   din,
  input  path_cfg_t cfg,
  output dac_t      dout
);

  sample_t delayed;

  if (HAS_DELAY) begin : g_delay
    delay_line #(.DEPTH(DEPTH), .DATA_W(ADC_W), .DELAY_W(DELAY_W)) u_delay (
      .clk   (clk),
      .rst_n (rst_n),
      .din   (din),
      .delay (cfg.delay),
      .dout  (delayed)
    );
  end else begin : g_nodelay
    logic [DELAY_W-1:0] unused_delay;
    assign unused_delay = cfg.delay;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) delayed <= '0;
      else        delayed <= din;
    end
  end

  path_scaler #(
    .IN_W(ADC_W), .SCALE_W(SCALE_W), .SHIFT_W(SHIFT_W), .PROD_W(30), .OUT_W(DAC_W), .MAX_SHIFT(14)
  ) u_scale (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (delayed),
    .scale (cfg.scale),
    .shift (cfg.shift),
    .dout  (dout)
  );

endmodule
