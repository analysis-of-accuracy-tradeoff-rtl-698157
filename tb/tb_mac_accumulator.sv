// tb_mac_accumulator: random sequences of clear, load, multiply,
// multiply-accumulate and hold on the 16-bit accumulator, compared every
// cycle with a reference register. Each operation must take effect at the
// clock edge it is presented on (single-cycle update). Also checks the
// asynchronous reset and that wrap-around past 2^16 occurs.
module tb_mac_accumulator;
  import mac_pkg::*;
  localparam int ACC_W = 16;
  logic clk = 1'b0, rst_n;
  op_e  op;
  logic [ACC_W-1:0] addend, load_val, acc, model;
  int checks = 0, failures = 0, wraps = 0, cycles = 0;
  int n_op [5];

  mac_accumulator #(.ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .op(op), .addend(addend), .load_val(load_val), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; op = OP_NOP; addend = '0; load_val = '0;
    #12;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      op       = op_e'($urandom_range(4));
      addend   = ACC_W'($urandom);
      load_val = ACC_W'($urandom);
      n_op[int'(op)]++;
      case (op)
        OP_CLR:  model = '0;
        OP_LOAD: model = load_val;
        OP_MUL:  model = addend;
        OP_MAC: begin
          if (int'(model) + int'(addend) >= (1 << ACC_W)) wraps++;
          model = ACC_W'(int'(model) + int'(addend));
        end
        default: ;
      endcase
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (acc !== model) begin
        failures++;
        $display("FAIL cycle %0d op=%s acc=%h expected %h", i, op.name(), acc, model);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL op %0d never issued", k); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around"); end
    // asynchronous reset between edges
    @(negedge clk); op = OP_LOAD; load_val = 16'hBEEF; @(posedge clk); #2;
    rst_n = 1'b0; #1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
