// cm_half_adder: carry-maskable half adder.
//
// mask_x is active low:
//   mask_x = 1 (not masked) : exact half adder, s = x ^ y, cout = x & y
//   mask_x = 0 (masked)     : cout is forced to 0 and s = x | y
// Used for bit 0 of the carry-maskable adder. Combinational. The behaviour
// in both states follows the design; the gates are written as one shared
// term (x & y & mask_x) so that the masked and unmasked cases share logic.
module cm_half_adder (
  input  logic mask_x,
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);

  logic g;   // carry generate, suppressed while masked

  assign g    = mask_x & x & y;
  assign s    = (x | y) & ~g;
  assign cout = g;

endmodule
