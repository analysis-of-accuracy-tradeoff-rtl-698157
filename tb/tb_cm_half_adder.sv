// tb_cm_half_adder: exhaustive check. Not masked (mask_x = 1): {cout, s} must
// be x + y. Masked (mask_x = 0): cout = 0 and s = x | y.
module tb_cm_half_adder;
  logic mask_x, x, y, s, cout;
  int checks = 0, failures = 0;

  cm_half_adder dut (.mask_x(mask_x), .x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] e;
      {mask_x, x, y} = 3'(i);
      #1;
      e = mask_x ? 2'(int'(x) + int'(y)) : {1'b0, x | y};
      checks++;
      if ({cout, s} !== e) begin
        failures++;
        $display("FAIL mask=%b x=%b y=%b -> cout=%b s=%b", mask_x, x, y, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
