// approx_tree_compressor: approximate partial-product reduction.
//
// The N partial-product rows are reduced in a binary tree of iCAC rows
// (see icac_row). Each node combines two vectors A, B into P = A | B, which
// is passed up the tree, and Q = A & B, an error-recovery vector of the same
// weight. Because A + B = P + Q at every node, the exact sum of the rows is
// the root's P plus the sum of all N-1 Q vectors. The tree has log2(N)
// levels of single OR/AND gates instead of the carry-save adder layers of an
// exact tree, which is what makes it cheap and shallow.
//
// Outputs:
//   approx : the root's P, an approximation (never above) of the row sum
//   err    : the N-1 Q vectors merged into one error-recovery vector
//
// The tree of iCAC rows and the use of Q as error recovery follow the design.
// How the Q vectors are merged is not specified there; this module merges
// them with a bitwise OR, the cheapest choice (it is also what a further
// tree of iCAC rows over the Q vectors would give as its P output). As a
// consequence approx + err can be below the exact sum when two Q vectors
// share a set bit. N need not be a power of two: missing leaves are zero.
// Combinational.
module approx_tree_compressor #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0][2*N-1:0] pp,
  output logic [2*N-1:0]        approx,
  output logic [2*N-1:0]        err
);

  localparam int unsigned W      = 2 * N;
  localparam int unsigned LEAVES = 1 << $clog2(N);   // leaves, rounded up
  localparam int unsigned NODES  = 2 * LEAVES - 1;   // heap: node k has children 2k+1, 2k+2

  logic [W-1:0] node_p [NODES];   // value passed up from each node
  logic [W-1:0] node_q [NODES];   // error-recovery vector of each inner node

  // Leaves: the partial-product rows, zero where N is not a power of two.
  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    if (l < N) begin : g_row
      assign node_p[LEAVES - 1 + l] = pp[l];
    end else begin : g_pad
      assign node_p[LEAVES - 1 + l] = '0;
    end
    assign node_q[LEAVES - 1 + l] = '0;
  end

  // Inner nodes: one iCAC row each.
  for (genvar k = 0; k < LEAVES - 1; k++) begin : g_node
    icac_row #(.M(W)) u_row (
      .a (node_p[2*k + 1]),
      .b (node_p[2*k + 2]),
      .p (node_p[k]),
      .q (node_q[k])
    );
  end

  assign approx = node_p[0];

  always_comb begin
    err = '0;
    for (int k = 0; k < int'(LEAVES) - 1; k++) begin
      err |= node_q[k];
    end
  end

endmodule
