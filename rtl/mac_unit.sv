// mac_unit: single-cycle multiplier-accumulator with an accuracy-
// controllable multiplier.
//
// The two N-bit operands x and y go through the approximate multiplier
// (approx_multiplier: AND partial products, iCAC tree compressor,
// carry-maskable final adder); the product is added to the accumulator in
// mac_accumulator, whose output is fed back, all within one clock cycle.
//
// Operand modes (mode, mac_pkg::mode_e):
//   MODE_UNSIGNED : x, y unsigned; mul = approximate x * y
//   MODE_SIGNED   : x, y two's complement; the magnitudes are multiplied
//                   by the unsigned multiplier and the sign is applied
//                   afterwards, so mul is a signed 2N-bit product
//   MODE_FRACT    : x, y signed Q1.7 fractions; as MODE_SIGNED, then shifted
//                   left by one bit to give a Q1.15 product. (-1) x (-1)
//                   wraps to -1, as the product +1 has no Q1.15 encoding.
// The product is zero-extended (unsigned) or sign-extended (signed modes)
// to ACC_W bits before it reaches the accumulator.
//
// Ports: clk, rst_n (asynchronous, active low); op selects the register
// operation (mac_pkg::op_e); mask (active low, one bit per product bit)
// sets the multiplier's carry masking; load_val feeds OP_LOAD. mul is the
// combinational product of the current inputs and acc the registered
// accumulator, updated on each rising edge.
//
// The multiplier-adder-accumulator loop, the single-cycle operation, the
// 16-bit width and the three operand kinds follow the design. The
// sign-magnitude handling of signed operands, the Q1.7 format of fractions
// and the register operations are this design's own choices.
module mac_unit
  import mac_pkg::*;
#(
  parameter int unsigned N     = mac_pkg::DEFAULT_N,
  parameter int unsigned ACC_W = mac_pkg::DEFAULT_ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  op_e              op,
  input  mode_e            mode,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  input  logic [2*N-1:0]   mask,
  input  logic [ACC_W-1:0] load_val,
  output logic [2*N-1:0]   mul,
  output logic [ACC_W-1:0] acc
);

  localparam int unsigned PW = 2 * N;

  logic           is_signed;
  logic           neg;
  logic [N-1:0]   mag_x, mag_y;
  logic [PW-1:0]  umul;
  logic [PW-1:0]  smul;
  logic [ACC_W-1:0] addend;

  assign is_signed = (mode == MODE_SIGNED) || (mode == MODE_FRACT);

  // Magnitudes. For the most negative value, -x wraps to the same bit
  // pattern, which read as unsigned is the correct magnitude 2^(N-1).
  assign mag_x = (is_signed && x[N-1]) ? N'(-x) : x;
  assign mag_y = (is_signed && y[N-1]) ? N'(-y) : y;
  assign neg   = is_signed && (x[N-1] ^ y[N-1]);

  approx_multiplier #(.N(N)) u_mult (
    .a    (mag_x),
    .b    (mag_y),
    .mask (mask),
    .p    (umul)
  );

  always_comb begin
    smul = neg ? PW'(-umul) : umul;
    if (mode == MODE_FRACT) mul = smul << 1;
    else                    mul = smul;
  end

  // Extend the product to the accumulator width.
  always_comb begin
    if (ACC_W > PW) begin
      addend = is_signed ? ACC_W'($signed(mul)) : ACC_W'(mul);
    end else begin
      addend = ACC_W'(mul);
    end
  end

  mac_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       (op),
    .addend   (addend),
    .load_val (load_val),
    .acc      (acc)
  );

endmodule
