// path_scaler: the gain of one tapped-delay-line path.
//
// The path gain is a = n * 2^-S: the 12-bit signed sample is multiplied by the
// 8-bit unsigned scale value n in an embedded multiplier (fine control), the
// 30-bit product is shifted right arithmetically by S (coarse control, S is
// limited to MAX_SHIFT = 14) and the result is truncated to the 14 low bits
// that go to the path adder. Unity gain is n = 1, S = 0; the largest gain that
// cannot overflow is 4 (n = 4, S = 0). Larger gains wrap around, as truncation
// does: keeping within them is left to whoever programs the paths.
//
// Timing: two pipeline registers. The product and the shift value are
// registered together in stage 1, the shifted and truncated word in stage 2,
// so dout is valid two clocks after din; scale and shift are sampled with din.
// Widths (12 x 8 -> 30 -> 14, 4-bit shift, 14-bit maximum shift) follow the
// paper; the pipeline split, the floor rounding of the arithmetic shift and
// the clamping of shift values above 14 are this design's choices.
module path_scaler #(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned SCALE_W   = 8,
  parameter int unsigned SHIFT_W   = 4,
  parameter int unsigned PROD_W    = 30,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned MAX_SHIFT = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [IN_W-1:0]   din,
  input  logic        [SCALE_W-1:0] scale,
  input  logic        [SHIFT_W-1:0] shift,
  output logic signed [OUT_W-1:0]  dout
);

  logic signed [PROD_W-1:0] prod_q;
  logic        [SHIFT_W-1:0] shift_q;
  logic signed [OUT_W-1:0]  trunc;
  logic signed [PROD_W-1:0] din_ext, scale_ext;

  assign din_ext   = PROD_W'(din);                // sign extension
  assign scale_ext = $signed(PROD_W'(scale));     // zero extension

  // Stage 1: embedded multiplier (scale zero-extended to a signed operand).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q  <= '0;
      shift_q <= '0;
    end else begin
      prod_q  <= din_ext * scale_ext;
      shift_q <= (shift > SHIFT_W'(MAX_SHIFT)) ? SHIFT_W'(MAX_SHIFT) : shift;
    end
  end

  // Stage 2: bit shift and truncation to the adder width.
  assign trunc = OUT_W'(prod_q >>> shift_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= trunc;
  end

endmodule
