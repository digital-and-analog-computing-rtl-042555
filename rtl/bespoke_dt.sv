// bespoke_dt: bespoke, fully parallel digital binary decision tree.
// The trained thresholds are hardwired, so every node reduces to a comparison
// of one feature against a constant and synthesis turns the tree into a few
// gates. All node decisions are formed at once; a leaf is active when every
// decision on its path agrees, so exactly one bit of the one-hot class output
// is set. Nodes are stored in heap order (children of node i are 2i+1 and
// 2i+2); a node sends the input right when feature >= threshold.
// The defaults are the printed depth-2, 2-bit, 2-feature prototype: the root
// tests x1 against 2, its left child x2 against 2 and its right child x1
// against 3, which uses only the bits x1[1], x1[0] and x2[1]. The node layout
// below the root and the ">=" direction are this design's reading.
// Combinational; leaves are numbered left to right (cls[0] = C1).
module bespoke_dt #(
  parameter int unsigned DEPTH  = 2,
  parameter int unsigned W      = 2,
  parameter int unsigned N_FEAT = 2,
  parameter int unsigned NODE_FEAT [2**DEPTH-1] = '{0, 1, 0},
  parameter int unsigned NODE_THR  [2**DEPTH-1] = '{2, 2, 3}
) (
  input  logic [N_FEAT-1:0][W-1:0] x,
  output logic [2**DEPTH-1:0]      cls
);
  localparam int unsigned N_NODE = 2**DEPTH - 1;
  localparam int unsigned N_LEAF = 2**DEPTH;

  logic [N_NODE-1:0] go_right;

  for (genvar n = 0; n < N_NODE; n++) begin : g_node
    assign go_right[n] = (32'(x[NODE_FEAT[n]]) >= NODE_THR[n]);
  end

  always_comb begin
    for (int unsigned l = 0; l < N_LEAF; l++) begin
      int unsigned node;
      logic        hit;
      node = 0;
      hit  = 1'b1;
      // walk from the root: bit DEPTH-1 of the leaf index is the first turn
      for (int d = int'(DEPTH) - 1; d >= 0; d--) begin
        if (go_right[node] != l[d]) hit = 1'b0;
        node = 2 * node + 1 + int'(l[d]);
      end
      cls[l] = hit;
    end
  end
endmodule
