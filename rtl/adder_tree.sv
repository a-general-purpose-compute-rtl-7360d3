// adder_tree: one of the four adder trees of the CCU.
//
// Adds N one-bit products (the per-column results of a DAMEM CIM read) with
// a balanced binary tree of adders and returns their count. N must be a power
// of two. The CCU holds four of these over 8 columns each; the split of the
// 32 columns into groups of 8 is this design's choice.
//
// Purely combinational.
module adder_tree #(
  parameter int unsigned N = 8,
  localparam int unsigned SW = $clog2(N) + 1
) (
  input  logic [N-1:0]  bits,
  output logic [SW-1:0] sum
);
  localparam int unsigned LEVELS = $clog2(N);

  // node[l][i] holds the partial sum of level l; level 0 are the inputs.
  logic [SW-1:0] node [LEVELS+1][N];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < N; i++)
        node[l][i] = '0;
    for (int i = 0; i < N; i++)
      node[0][i] = SW'(bits[i]);
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (N >> l); i++)
        node[l][i] = node[l-1][2*i] + node[l-1][2*i+1];
    sum = node[LEVELS][0];
  end
endmodule
