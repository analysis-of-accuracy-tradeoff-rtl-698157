// approx_multiplier: accuracy-controllable N x N unsigned multiplier.
//
// Three stages, all combinational:
//   1. pp_gen                 : AND-array partial products, N rows of 2N bits
//   2. approx_tree_compressor : reduces the rows with a tree of iCAC rows to
//                               an approximate vector and an error-recovery
//                               vector
//   3. cma                    : the final carry-propagate adder is a 2N-bit
//                               carry-maskable adder that adds the two
//
// The mask input (active low, one bit per product bit) sets the accuracy at
// run time. All ones gives approx + err with full carry propagation, the
// most accurate result; all zeros gives approx | err with no carry chain at
// all. For thermometer masks (ones above, zeros below) the result never
// exceeds the exact product, so it fits in 2N bits and the adder's carry
// out is not needed; it is dropped. Example: 11 x 11 with all mask bits set
// gives 121.
//
// Stages and their order follow the design; N = 8 and the 16-bit result
// are its sizes. The mask port is this design's way of exposing the CMA's
// run-time control.
module approx_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] mask,   // active low, per product bit
  output logic [2*N-1:0] p
);

  logic [N-1:0][2*N-1:0] pp;
  logic [2*N-1:0]        approx;
  logic [2*N-1:0]        err;
  logic                  carry_out;   // not needed, see above

  pp_gen #(.N(N)) u_pp (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  approx_tree_compressor #(.N(N)) u_tree (
    .pp     (pp),
    .approx (approx),
    .err    (err)
  );

  cma #(.W(2*N)) u_cma (
    .a    (approx),
    .b    (err),
    .mask (mask),
    .sum  (p),
    .cout (carry_out)
  );

endmodule
