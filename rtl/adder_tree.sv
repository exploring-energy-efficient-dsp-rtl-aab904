// adder_tree: sums N signed W-bit values in a balanced binary tree of
// two-input adders, wrapping at W bits like the fixed-point datapath it
// serves. The tree is laid out as a heap: leaves at nodes N..2N-1, node k
// adds nodes 2k and 2k+1, the root is node 1, which works for any N.
// The inputs come as one packed vector, element i in bits
// [i*W +: W]. Purely combinational. The document does not say how the
// products of the parallel multipliers are added; the tree is this
// design's choice.
module adder_tree #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] din,
  output logic signed [W-1:0] sum
);

  logic [2*N-1:1][W-1:0] node;

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign node[N+i] = din[i];
  end
  for (genvar k = 1; k < N; k++) begin : g_add
    assign node[k] = node[2*k] + node[2*k+1];
  end

  assign sum = node[1];

endmodule
