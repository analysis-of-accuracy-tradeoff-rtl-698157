// tb_approx_tree_compressor: drives random rows (and real partial products)
// into the 8-row compressor and compares both outputs with the level-by-
// level reference model. Also checks that the root output plus the exact sum
// of all error vectors equals the exact sum of the rows.
module tb_approx_tree_compressor;
  import ref_model_pkg::*;
  localparam int N = 8;
  logic [N-1:0][2*N-1:0] pp;
  logic [2*N-1:0] approx, err;
  int checks = 0, failures = 0;

  approx_tree_compressor #(.N(N)) dut (.pp(pp), .approx(approx), .err(err));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [4*N-1:0] e;
      int unsigned qs, total;
      if (i % 2 == 0) begin
        for (int r = 0; r < N; r++) pp[r] = (2*N)'($urandom);
      end else begin
        pp = rows_ref(N'($urandom), N'($urandom));
      end
      #1;
      e = tree_ref(pp, qs);
      total = 0;
      for (int r = 0; r < N; r++) total += 32'(pp[r]);
      checks++;
      if (approx !== e[4*N-1:2*N] || err !== e[2*N-1:0]) begin
        failures++;
        $display("FAIL approx=%h err=%h expected %h %h", approx, err, e[4*N-1:2*N], e[2*N-1:0]);
      end
      checks++;
      if (int'(approx) + qs != total) begin
        failures++;
        $display("FAIL identity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
