// pp_gen: partial-product generation of an N x N unsigned multiplier.
//
// Row i is the multiplicand ANDed with multiplier bit b[i] and placed at
// weight 2^i, so the exact product is the sum of the N rows. The rows are
// returned already shifted into a 2N-bit field. (Before shifting, the rows
// of 11 x 11 are 0x0B, 0x0B, 0x00, 0x0B, ...; concatenated with row 0 in the
// low byte they read 0x0B000B0B, as in the reference simulation of the
// design.) Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  output logic [N-1:0][2*N-1:0]  pp
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = (2*N)'({N{b[i]}} & a) << i;
    end
  end

endmodule
