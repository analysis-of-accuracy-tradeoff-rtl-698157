// tb_pp_gen: checks the AND-array partial products. Each row must be a
// when b[i] is set (shifted by i) and zero otherwise, and the rows must add
// up to a * b. Includes 11 x 11, whose unshifted rows concatenated read
// 184552203 (0x0B000B0B).
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    int unsigned total;
    total = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pp[i] !== (b[i] ? (2*N)'(a) * (2*N)'(1 << i) : '0)) begin
        failures++;
        $display("FAIL row %0d a=%0d b=%0d row=%h", i, a, b, pp[i]);
      end
      total += 32'(pp[i]);
    end
    checks++;
    if (total != int'(a) * int'(b)) begin
      failures++;
      $display("FAIL sum a=%0d b=%0d sum=%0d", a, b, total);
    end
  endtask

  initial begin
    logic [8*N-1:0] unshifted;
    a = 8'd11; b = 8'd11; #1;
    check_all();
    for (int i = 0; i < N; i++) unshifted[8*i +: 8] = N'(pp[i] >> i);
    checks++;
    if (unshifted !== 64'd184552203) begin
      failures++;
      $display("FAIL 11x11 rows %0d", unshifted);
    end
    for (int i = 0; i < 2000; i++) begin
      a = N'($urandom); b = N'($urandom); #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
