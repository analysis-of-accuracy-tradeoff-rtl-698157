// cma: W-bit carry-maskable adder.
//
// Structured like a ripple-carry adder: a carry-maskable half adder at bit 0
// and W-1 carry-maskable full adders above it. Every bit position has its
// own active-low mask bit:
//   mask = all ones  : a normal carry-propagate adder, sum = a + b
//   mask = all zeros : W independent OR gates, sum = a | b, cout = 0
//   mask = {k ones, W-k zeros} : OR in the low W-k bits, exact addition
//                     above, so the carry chain is only k bits long
// Setting the mask at run time therefore chooses how long the carry
// propagation is, trading accuracy for delay and power. The structure
// follows the design; W = 16 is this design's choice, the width of the
// final adder of the 8 x 8 multiplier. Combinational.
module cma #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] mask,   // active low, one bit per position
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:1] c;   // c[i] is the carry into bit i

  cm_half_adder u_ha (
    .mask_x (mask[0]),
    .x      (a[0]),
    .y      (b[0]),
    .s      (sum[0]),
    .cout   (c[1])
  );

  for (genvar i = 1; i < W; i++) begin : g_fa
    cm_full_adder u_fa (
      .mask_x (mask[i]),
      .x      (a[i]),
      .y      (b[i]),
      .cin    (c[i]),
      .s      (sum[i]),
      .cout   (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
