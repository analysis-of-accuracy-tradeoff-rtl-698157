// mac_pkg: types and constants shared by the multiplier-accumulator.
//
// The MAC works on 8-bit operands and a 16-bit product, matching the 8x8
// multiplier with a 16-bit result (a(7:0), b(7:0), p(15:0)) and the
// "16 bit multiplier accumulator" of the design. The operand modes
// (unsigned, signed, signed fractional) and the register operations follow
// the list of functions a MAC of this kind supports; their encodings are this
// design's own choice.
package mac_pkg;

  // Default operand width (the product is twice as wide).
  localparam int unsigned DEFAULT_N     = 8;
  // Default accumulator width.
  localparam int unsigned DEFAULT_ACC_W = 16;

  // How the two operands are interpreted.
  //   MODE_UNSIGNED : unsigned integers
  //   MODE_SIGNED   : two's-complement integers
  //   MODE_FRACT    : two's-complement Q1.7 fractions; the product is
  //                   returned as Q1.15 (shifted left by one bit)
  typedef enum logic [1:0] {
    MODE_UNSIGNED = 2'd0,
    MODE_SIGNED   = 2'd1,
    MODE_FRACT    = 2'd2
  } mode_e;

  // What the accumulator register does on a clock edge.
  //   OP_NOP  : hold
  //   OP_CLR  : clear to zero
  //   OP_LOAD : load an external value
  //   OP_MUL  : store the product (plain multiply)
  //   OP_MAC  : add the product to the accumulator (multiply-accumulate)
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_CLR  = 3'd1,
    OP_LOAD = 3'd2,
    OP_MUL  = 3'd3,
    OP_MAC  = 3'd4
  } op_e;

endpackage
