// ref_model_pkg: reference models for the testbenches.
//
// Written as plain loops over bits and rows, independently of the RTL
// structure:
//   cma_ref        : carry-maskable addition, bit by bit. Where a mask bit
//                    is 1 the position adds x + y + carry exactly; where it
//                    is 0 the sum bit is x | y and the carry passes through
//                    unchanged (bit 0 passes on 0).
//   tree_ref       : the iCAC tree: rows are OR-ed pairwise level by level;
//                    the AND of every pair is collected into the
//                    error-recovery vector (OR-merged) and into an exact sum.
//   approx_mul_ref : 8 x 8 unsigned multiplier = tree of the shifted AND
//                    rows, then cma_ref of the two tree outputs.
package ref_model_pkg;

  localparam int unsigned RN = 8;
  localparam int unsigned RW = 16;

  function automatic logic [RW:0] cma_ref(input logic [RW-1:0] a,
                                          input logic [RW-1:0] b,
                                          input logic [RW-1:0] mask);
    logic [RW:0] r;
    logic        c;
    int          t;
    c = 1'b0;
    r = '0;
    for (int i = 0; i < int'(RW); i++) begin
      if (mask[i]) begin
        t    = int'(a[i]) + int'(b[i]) + int'(c);
        r[i] = t[0];
        c    = t[1];
      end else begin
        r[i] = a[i] | b[i];
        // carry passes through unchanged (bit 0 has none coming in)
      end
    end
    r[RW] = c;
    return r;
  endfunction

  // Returns {approx, err}; qsum is the exact sum of all error vectors.
  function automatic logic [2*RW-1:0] tree_ref(input logic [RN-1:0][RW-1:0] rows,
                                               output int unsigned qsum);
    logic [RW-1:0] cur [RN];
    logic [RW-1:0] err;
    int            n;
    for (int i = 0; i < int'(RN); i++) cur[i] = rows[i];
    err  = '0;
    qsum = 0;
    n    = RN;
    while (n > 1) begin
      for (int j = 0; j < n / 2; j++) begin
        logic [RW-1:0] q;
        q      = cur[2*j] & cur[2*j+1];
        err    = err | q;
        qsum   = qsum + 32'(q);
        cur[j] = cur[2*j] | cur[2*j+1];
      end
      n = n / 2;
    end
    return {cur[0], err};
  endfunction

  function automatic logic [RN-1:0][RW-1:0] rows_ref(input logic [RN-1:0] a,
                                                     input logic [RN-1:0] b);
    logic [RN-1:0][RW-1:0] rows;
    for (int i = 0; i < int'(RN); i++)
      rows[i] = b[i] ? (RW'(a) << i) : '0;
    return rows;
  endfunction

  function automatic logic [RW-1:0] approx_mul_ref(input logic [RN-1:0] a,
                                                   input logic [RN-1:0] b,
                                                   input logic [RW-1:0] mask);
    logic [2*RW-1:0] t;
    logic [RW:0]     s;
    int unsigned     qs;
    t = tree_ref(rows_ref(a, b), qs);
    s = cma_ref(t[2*RW-1:RW], t[RW-1:0], mask);
    return s[RW-1:0];
  endfunction

endpackage
