// icac: incomplete adder cell.
//
// A half adder writes a + b as {c, s} = 2c + s, which equals (c + s) + c.
// Since c + s of a half adder is simply a OR b, the cell instead produces
//   p = a | b   and   q = a & b,
// two bits of the SAME weight whose sum p + q is exactly a + b. p alone is
// an approximation of the sum and q is the bit that recovers the error.
// This is the building block of the approximate tree compressor.
// Purely combinational; no clock.
module icac (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a | b;
  assign q = a & b;

endmodule
