// tb_accuracy_sweep: accuracy against carry-chain length for the 8 x 8
// multiplier.
//
// For each k = 0..16 the mask keeps the carry chain in the top k product
// bits and replaces the low 16 - k positions by OR gates (thermometer mask
// {k ones, 16-k zeros}). All 65536 operand pairs are run for every k; each
// result is compared with the reference model and must not exceed the exact
// product. The mean relative error, the largest absolute error and the
// share of exact results are printed per k, and the mean relative error must
// not grow as the carry chain gets longer.
module tb_accuracy_sweep;
  import ref_model_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [2*N-1:0] mask, p;
  int checks = 0, failures = 0;

  approx_multiplier dut (.a(a), .b(b), .mask(mask), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev_mre;
    prev_mre = 1.0e9;
    $display("  k  mean-rel-err  max-abs-err  exact");
    for (int k = 0; k <= 2*N; k++) begin
      real mre;
      int  maxerr, nexact;
      mre = 0.0; maxerr = 0; nexact = 0;
      mask = (2*N)'({(2*N){1'b1}} << (2*N - k));
      for (int i = 0; i < 65536; i++) begin
        int ex, d;
        {a, b} = 16'(i);
        #1;
        ex = int'(a) * int'(b);
        d  = ex - int'(p);
        checks++;
        if (p !== approx_mul_ref(a, b, mask) || d < 0) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d a=%0d b=%0d p=%0d", k, a, b, p);
        end
        if (ex != 0) mre += real'(d) / real'(ex);
        if (d > maxerr) maxerr = d;
        if (d == 0) nexact++;
      end
      mre = mre / 65536.0;
      $display(" %2d  %12.6f  %11d  %5d", k, mre, maxerr, nexact);
      checks++;
      if (mre > prev_mre + 1.0e-12) begin
        failures++;
        $display("FAIL error grew from k=%0d to k=%0d", k - 1, k);
      end
      prev_mre = mre;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
