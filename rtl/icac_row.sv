// icac_row: a row of M incomplete adder cells.
//
// Applied bitwise to two M-bit values A and B, the cells give
//   P = A | B   (approximate sum)   and   Q = A & B   (error-recovery vector)
// with A + B = P + Q exactly. For example A = 01011111, B = 00110110 gives
// P = 01111111, Q = 00010110, and P + Q = 10010101 = A + B.
// Combinational; M = 8 is the row width used for 8-bit inputs.
module icac_row #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p,
  output logic [M-1:0] q
);

  for (genvar i = 0; i < M; i++) begin : g_cell
    icac u_cell (.a(a[i]), .b(b[i]), .p(p[i]), .q(q[i]));
  end

endmodule
