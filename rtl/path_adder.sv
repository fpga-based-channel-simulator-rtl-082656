// path_adder: sums the path outputs that end at one destination node.
//
// N_IN signed W-bit inputs are added in a balanced binary tree with a register
// after every level, so the sum appears ceil(log2(N_IN)) clocks after its
// inputs (1 clock for a single input). Inputs, partial sums and the output are
// all W = 14 bits wide and wrap on overflow, as in the paper's design, where
// the path settings must keep the summed path gains within range; the tree
// shape and pipelining are this design's choices.
module path_adder #(
  parameter int unsigned N_IN = 14,
  parameter int unsigned W    = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din [N_IN],
  output logic signed [W-1:0] dout
);

  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // lvl[l][i]: i-th partial sum after level l (level 0 = zero-padded inputs).
  logic signed [W-1:0] lvl [LEVELS+1][LEAVES];

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (i < N_IN) begin : g_in
      assign lvl[0][i] = din[i];
    end else begin : g_pad
      assign lvl[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NODES = LEAVES >> (l + 1);
    for (genvar i = 0; i < NODES; i++) begin : g_node
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) lvl[l+1][i] <= '0;
        else        lvl[l+1][i] <= lvl[l][2*i] + lvl[l][2*i+1];
      end
    end
    for (genvar i = NODES; i < LEAVES; i++) begin : g_idle
      assign lvl[l+1][i] = '0;
    end
  end

  assign dout = lvl[LEVELS][0];

endmodule
