// tb_icac: exhaustive check of the incomplete adder cell. For every input
// pair the arithmetic sum a + b (0, 1 or 2) is computed, and p, q must be
// the two equal-weight bits that add up to it: p = (sum != 0),
// q = (sum == 2), and p + q == a + b.
module tb_icac;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  icac dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int s;
      {a, b} = 2'(i);
      #1;
      s = int'(a) + int'(b);
      checks++;
      if (p !== (s != 0) || q !== (s == 2) || int'(p) + int'(q) != s) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
