// tb_icac_row: checks a row of 8 iCACs with the worked example
// A = 01011111, B = 00110110 -> P = 01111111, Q = 00010110, and with random
// operands for the identity A + B == P + Q and the per-bit values.
module tb_icac_row;
  localparam int M = 8;
  logic [M-1:0] a, b, p, q;
  int checks = 0, failures = 0;

  icac_row #(.M(M)) dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [M-1:0] ep, input logic [M-1:0] eq);
    checks++;
    if (p !== ep || q !== eq || (int'(p) + int'(q)) != (int'(a) + int'(b))) begin
      failures++;
      $display("FAIL a=%b b=%b p=%b q=%b expected p=%b q=%b", a, b, p, q, ep, eq);
    end
  endtask

  initial begin
    a = 8'b01011111; b = 8'b00110110; #1;
    check(8'b01111111, 8'b00010110);
    checks++;
    if (int'(p) + int'(q) != 'b10010101) begin
      failures++;
      $display("FAIL example sum");
    end
    for (int i = 0; i < 500; i++) begin
      logic [M-1:0] ep, eq;
      a = M'($urandom); b = M'($urandom); #1;
      for (int k = 0; k < M; k++) begin
        ep[k] = (a[k] + b[k]) != 0;
        eq[k] = (a[k] + b[k]) == 2;
      end
      check(ep, eq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
