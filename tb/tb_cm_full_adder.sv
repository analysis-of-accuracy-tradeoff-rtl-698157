// tb_cm_full_adder: exhaustive check. Not masked (mask_x = 1): {cout, s}
// must be x + y + cin. Masked (mask_x = 0): cout = cin and s = x | y.
module tb_cm_full_adder;
  logic mask_x, x, y, cin, s, cout;
  int checks = 0, failures = 0;

  cm_full_adder dut (.mask_x(mask_x), .x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [1:0] e;
      {mask_x, x, y, cin} = 4'(i);
      #1;
      e = mask_x ? 2'(int'(x) + int'(y) + int'(cin)) : {cin, x | y};
      checks++;
      if ({cout, s} !== e) begin
        failures++;
        $display("FAIL mask=%b x=%b y=%b cin=%b -> cout=%b s=%b", mask_x, x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
