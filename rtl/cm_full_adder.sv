// cm_full_adder: carry-maskable full adder.
//
// mask_x is active low:
//   mask_x = 1 (not masked) : exact full adder, s = x ^ y ^ cin,
//                             cout = majority(x, y, cin)
//   mask_x = 0 (masked)     : cout = cin (the incoming carry is passed on
//                             unchanged) and s = x | y
// Combinational. Both cases follow the design's description; in the masked
// case the sum bit is taken to be the OR of the two operand bits only. In
// the carry-maskable adder the masked positions normally sit below all
// unmasked ones, so cin is 0 there and the carry passed on is 0 as well.
module cm_full_adder (
  input  logic mask_x,
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic g;   // carry generate, suppressed while masked
  logic h;   // half sum: x ^ y when not masked, x | y when masked

  assign g    = mask_x & x & y;
  assign h    = (x | y) & ~g;
  assign s    = mask_x ? (h ^ cin) : h;
  assign cout = g | (mask_x ? (h & cin) : cin);

endmodule
