// mac_accumulator: the adder and accumulator register of the MAC.
//
// The accumulator output is fed back into the adder together with the new
// product, and the sum is registered, so one multiply-accumulate completes
// in a single clock cycle: the value on `addend` in the cycle an OP_MAC is
// presented appears on `acc` right after that clock edge. Besides OP_MAC the
// register supports clear, load, hold and a plain multiply (store the
// product without adding). Arithmetic wraps modulo 2^ACC_W.
//
// Interface: `op` (mac_pkg::op_e) is sampled on every rising clock edge;
// `addend` is the product already extended to ACC_W bits; `rst_n` is an
// asynchronous active-low reset that clears the accumulator.
// The single-cycle loop and the 16-bit width follow the design; the adder is
// a plain binary adder, and the register operations, their encodings and
// the reset are this design's own.
module mac_accumulator
  import mac_pkg::*;
#(
  parameter int unsigned ACC_W = mac_pkg::DEFAULT_ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  op_e              op,
  input  logic [ACC_W-1:0] addend,
  input  logic [ACC_W-1:0] load_val,
  output logic [ACC_W-1:0] acc
);

  logic [ACC_W-1:0] sum;
  logic [ACC_W-1:0] acc_next;

  assign sum = acc + addend;

  always_comb begin
    unique case (op)
      OP_CLR:  acc_next = '0;
      OP_LOAD: acc_next = load_val;
      OP_MUL:  acc_next = addend;
      OP_MAC:  acc_next = sum;
      default: acc_next = acc;        // OP_NOP and unused codes hold
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_next;
  end

endmodule
