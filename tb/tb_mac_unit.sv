// tb_mac_unit: end-to-end test of the MAC at its default sizes (8-bit
// operands, 16-bit product and accumulator).
//
// Random streams of operations, operand modes and carry masks are applied
// one per clock cycle. A reference model (sign-magnitude around the
// reference approximate multiplier, Q1.15 shift for fractions, wrapping
// 16-bit accumulator) predicts `mul` combinationally and `acc` one clock
// edge after each operation. Directed cases: 11 x 11 = 121 unsigned,
// a dot product accumulated over several cycles, and (-1) x (-1) in the
// fractional mode. Every mechanism is counted and must occur at least
// once: each operation, each operand mode, full and partial carry masking,
// a result that differs from the exact product, a negative product, and
// accumulator wrap-around.
module tb_mac_unit;
  import mac_pkg::*;
  import ref_model_pkg::*;

  localparam int N = 8;
  localparam int ACC_W = 16;

  logic clk = 1'b0, rst_n;
  op_e   op;
  mode_e mode;
  logic [N-1:0]     x, y;
  logic [2*N-1:0]   mask;
  logic [ACC_W-1:0] load_val;
  logic [2*N-1:0]   mul;
  logic [ACC_W-1:0] acc;

  logic [ACC_W-1:0] model_acc;
  int checks = 0, failures = 0;
  int n_op [5];
  int n_mode [3];
  int n_full_mask = 0, n_part_mask = 0, n_inexact = 0, n_negative = 0, n_wrap = 0;

  mac_unit dut (
    .clk(clk), .rst_n(rst_n), .op(op), .mode(mode), .x(x), .y(y),
    .mask(mask), .load_val(load_val), .mul(mul), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected product of the current inputs.
  function automatic logic [2*N-1:0] expected_mul(mode_e m, logic [N-1:0] a,
                                                  logic [N-1:0] b, logic [2*N-1:0] msk,
                                                  output int exact);
    logic [N-1:0] ma, mb;
    logic [2*N-1:0] u, s;
    logic sgn;
    if (m == MODE_UNSIGNED) begin
      ma = a; mb = b; sgn = 1'b0;
      exact = int'(a) * int'(b);
    end else begin
      ma = a[N-1] ? N'(0 - int'(a)) : a;
      mb = b[N-1] ? N'(0 - int'(b)) : b;
      sgn = a[N-1] ^ b[N-1];
      exact = int'($signed(a)) * int'($signed(b));
    end
    u = approx_mul_ref(ma, mb, msk);
    s = sgn ? (2*N)'(0 - int'(u)) : u;
    if (m == MODE_FRACT) begin
      s = s << 1;
      exact = exact * 2;
    end
    return s;
  endfunction

  // Apply one operation: set inputs after the falling edge, check mul,
  // update the model, check acc right after the rising edge.
  task automatic step(op_e o, mode_e m, logic [N-1:0] a, logic [N-1:0] b,
                      logic [2*N-1:0] msk, logic [ACC_W-1:0] lv);
    logic [2*N-1:0] em;
    int ex;
    @(negedge clk);
    op = o; mode = m; x = a; y = b; mask = msk; load_val = lv;
    #1;
    em = expected_mul(m, a, b, msk, ex);
    checks++;
    if (mul !== em) begin
      failures++;
      $display("FAIL mul mode=%s x=%h y=%h mask=%h -> %h expected %h", m.name(), a, b, msk, mul, em);
    end
    if (o == OP_MUL || o == OP_MAC) begin
      if (em != (2*N)'(ex)) n_inexact++;
      if (ex < 0) n_negative++;
      if (msk == '1) n_full_mask++; else n_part_mask++;
      n_mode[int'(m)]++;
    end
    n_op[int'(o)]++;
    case (o)
      OP_CLR:  model_acc = '0;
      OP_LOAD: model_acc = lv;
      OP_MUL:  model_acc = em;
      OP_MAC: begin
        if (int'(model_acc) + int'(em) >= (1 << ACC_W)) n_wrap++;
        model_acc = ACC_W'(int'(model_acc) + int'(em));
      end
      default: ;
    endcase
    @(posedge clk); #1;
    checks++;
    if (acc !== model_acc) begin
      failures++;
      $display("FAIL acc op=%s -> %h expected %h", o.name(), acc, model_acc);
    end
  endtask

  initial begin
    rst_n = 1'b0; op = OP_NOP; mode = MODE_UNSIGNED; x = '0; y = '0; mask = '1; load_val = '0;
    model_acc = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;

    // 11 x 11 = 121
    step(OP_MUL, MODE_UNSIGNED, 8'd11, 8'd11, '1, '0);
    checks++;
    if (acc !== 16'd121) begin failures++; $display("FAIL 11x11 acc=%0d", acc); end

    // signed dot product (3, -4, 5) . (7, 6, -2) = 21 - 24 - 10 = -13, exact operands
    step(OP_CLR, MODE_SIGNED, '0, '0, '1, '0);
    step(OP_MAC, MODE_SIGNED, 8'd3, 8'd7, '1, '0);
    step(OP_MAC, MODE_SIGNED, -8'sd4, 8'd6, '1, '0);
    step(OP_MAC, MODE_SIGNED, 8'd5, -8'sd2, '1, '0);
    checks++;
    if ($signed(acc) !== -16'sd13) begin failures++; $display("FAIL dot product acc=%0d", $signed(acc)); end

    // fractional: 0.5 x 0.5 = 0.25, (-1) x (-1) wraps to -1
    step(OP_MUL, MODE_FRACT, 8'h40, 8'h40, '1, '0);
    checks++;
    if (acc !== 16'h2000) begin failures++; $display("FAIL 0.5x0.5 acc=%h", acc); end
    step(OP_MUL, MODE_FRACT, 8'h80, 8'h80, '1, '0);
    checks++;
    if (acc !== 16'h8000) begin failures++; $display("FAIL -1x-1 acc=%h", acc); end

    // random stream
    for (int i = 0; i < 20000; i++) begin
      op_e o;
      mode_e m;
      logic [2*N-1:0] msk;
      int r;
      r = $urandom_range(99);
      o = (r < 5) ? OP_CLR : (r < 10) ? OP_LOAD : (r < 15) ? OP_NOP : (r < 40) ? OP_MUL : OP_MAC;
      m = mode_e'($urandom_range(2));
      case ($urandom_range(2))
        0:       msk = '1;
        1:       msk = (2*N)'({(2*N){1'b1}} << $urandom_range(2*N));
        default: msk = (2*N)'($urandom);
      endcase
      step(o, m, N'($urandom), N'($urandom), msk, ACC_W'($urandom));
    end

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL op %0d never issued", k); end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_mode[k] == 0) begin failures++; $display("FAIL mode %0d never used", k); end
    end
    checks += 5;
    if (n_full_mask == 0) begin failures++; $display("FAIL full carry never used"); end
    if (n_part_mask == 0) begin failures++; $display("FAIL masking never used"); end
    if (n_inexact == 0)   begin failures++; $display("FAIL no approximate result"); end
    if (n_negative == 0)  begin failures++; $display("FAIL no negative product"); end
    if (n_wrap == 0)      begin failures++; $display("FAIL no accumulator wrap"); end
    $display("ops clr=%0d load=%0d nop=%0d mul=%0d mac=%0d; modes u=%0d s=%0d f=%0d",
             n_op[1], n_op[2], n_op[0], n_op[3], n_op[4], n_mode[0], n_mode[1], n_mode[2]);
    $display("full-carry=%0d masked=%0d inexact=%0d negative=%0d wraps=%0d",
             n_full_mask, n_part_mask, n_inexact, n_negative, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
