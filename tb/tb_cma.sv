// tb_cma: checks the 16-bit carry-maskable adder. All mask bits set: the
// result must be a + b. No mask bits set: a | b with no carry out. Random
// and thermometer masks: compared with the bit-serial reference model; for
// thermometer masks the result must also never exceed a + b.
module tb_cma;
  import ref_model_pkg::*;
  localparam int W = 16;
  logic [W-1:0] a, b, mask, sum;
  logic cout;
  int checks = 0, failures = 0;

  cma #(.W(W)) dut (.a(a), .b(b), .mask(mask), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W:0] e);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL a=%h b=%h mask=%h -> %h expected %h", a, b, mask, {cout, sum}, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = W'($urandom); b = W'($urandom);
      case (i % 4)
        0: begin
          mask = '1; #1;
          check((W+1)'(a) + (W+1)'(b));
        end
        1: begin
          mask = '0; #1;
          check({1'b0, a | b});
        end
        2: begin
          mask = W'($urandom); #1;
          check(cma_ref(a, b, mask));
        end
        default: begin
          int k;
          k = $urandom_range(W);
          mask = W'({W{1'b1}} << k); #1;
          check(cma_ref(a, b, mask));
          checks++;
          if (int'({cout, sum}) > int'(a) + int'(b)) begin
            failures++;
            $display("FAIL thermometer result above exact sum");
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
