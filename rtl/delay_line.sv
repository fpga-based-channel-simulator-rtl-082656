// delay_line: programmable path delay in whole samples, held in one block RAM.
//
// Every clock (one ADC sample, 5.56 ns at 180 MHz) the input sample is written
// to a circular buffer of DEPTH words and one word is read back DELAY samples
// behind the write pointer. With the 1536-word default (18 kbit of 12-bit
// samples) the longest delay is 1535 samples, about 8.53 us. The read port
// behaves like a write-first block RAM: a delay of 0 returns the sample being
// written, so the output is always the input delayed by DELAY + 1 clocks.
// Delay values above DEPTH-1 are clamped to DEPTH-1. The memory starts out
// cleared, as block RAM does after configuration; reset only restarts the
// write pointer, so samples written before a reset stay in the buffer.
//
// The memory size and sample width follow the paper's design; the circular
// buffer, the write-first read and the clamping are this design's choices.
// The delay value may change on any clock; the output then jumps to the new
// tap on the next clock.
module delay_line #(
  parameter int unsigned DEPTH   = 1536,
  parameter int unsigned DATA_W  = 12,
  parameter int unsigned DELAY_W = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DATA_W-1:0]  din,
  input  logic [DELAY_W-1:0] delay,
  output logic [DATA_W-1:0]  dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = (AW > DELAY_W) ? AW : DELAY_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr;
  logic [AW-1:0]     rd_addr;
  logic [CW-1:0]     d;

  always_comb begin
    if (CW'(delay) > CW'(DEPTH - 1)) d = CW'(DEPTH - 1);
    else                             d = CW'(delay);
    if (CW'(wr_ptr) >= d) rd_addr = AW'(CW'(wr_ptr) - d);
    else                  rd_addr = AW'(CW'(wr_ptr) + CW'(DEPTH) - d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           wr_ptr <= '0;
    else if (wr_ptr == AW'(DEPTH - 1))    wr_ptr <= '0;
    else                                  wr_ptr <= wr_ptr + 1'b1;
  end

  // Block RAM contents are zero after FPGA configuration, so taps longer than
  // the time since reset read silence rather than stale samples.
  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  // Block RAM: one write and one registered read per clock, write-first.
  always_ff @(posedge clk) begin
    mem[wr_ptr] <= din;
    if (d == '0) dout <= din;
    else         dout <= mem[rd_addr];
  end

endmodule
