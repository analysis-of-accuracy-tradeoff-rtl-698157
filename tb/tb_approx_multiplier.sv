// tb_approx_multiplier: checks the 8 x 8 accuracy-controllable multiplier.
//   - 11 x 11 with full carry propagation gives 121.
//   - All 65536 operand pairs with full carry propagation and with all
//     carries masked, against the reference model; the result must never
//     exceed the exact product, and 0 x b, 1 x b, powers of two are exact.
//   - Random thermometer and random masks against the reference model.
// It also reports the mean relative error for full and no carry propagation.
module tb_approx_multiplier;
  import ref_model_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [2*N-1:0] mask, p;
  int checks = 0, failures = 0;

  approx_multiplier #(.N(N)) dut (.a(a), .b(b), .mask(mask), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2*N-1:0] e);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%0d b=%0d mask=%h -> %0d expected %0d", a, b, mask, p, e);
    end
  endtask

  initial begin
    real err_full, err_none;
    int  exact_full;
    err_full = 0.0; err_none = 0.0; exact_full = 0;

    a = 8'd11; b = 8'd11; mask = '1; #1;
    check(16'd121);

    for (int i = 0; i < 65536; i++) begin
      int ex;
      {a, b} = 16'(i);
      ex = int'(a) * int'(b);
      mask = '1; #1;
      check(approx_mul_ref(a, b, mask));
      checks++;
      if (int'(p) > ex) begin failures++; $display("FAIL above exact"); end
      if ((a & (a - 8'd1)) == 0) check(16'(ex));     // a is 0 or a power of two
      if (ex != 0) err_full += real'(ex - int'(p)) / real'(ex);
      if (int'(p) == ex) exact_full++;
      mask = '0; #1;
      check(approx_mul_ref(a, b, mask));
      checks++;
      if (int'(p) > ex) begin failures++; $display("FAIL above exact"); end
      if (ex != 0) err_none += real'(ex - int'(p)) / real'(ex);
    end

    for (int i = 0; i < 5000; i++) begin
      a = N'($urandom); b = N'($urandom);
      if (i % 2 == 0) mask = (2*N)'({(2*N){1'b1}} << $urandom_range(2*N));
      else            mask = (2*N)'($urandom);
      #1;
      check(approx_mul_ref(a, b, mask));
    end

    $display("mean relative error: full carry %f, no carry %f; exact results with full carry: %0d of 65536",
             err_full / 65536.0, err_none / 65536.0, exact_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
