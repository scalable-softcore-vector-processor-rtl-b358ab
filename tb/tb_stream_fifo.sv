// tb_stream_fifo: self-checking test of the stream FIFO.
// Random valid/ready on both sides; every word pushed is queued in a model
// and must come out in order. Checks that the FIFO reports full after DEPTH
// words with the output blocked, that in_ready drops then, that a push and a
// pop in the same cycle work when full, and the count output.
module tb_stream_fifo;
  localparam int W = 16, D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(model.size() > 0 && out_data == model[0],
            $sformatf("out %h, expected %h", out_data, model.size() ? model[0] : '0));
      if (model.size() > 0) void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill with the output blocked
    for (int i = 0; i < D; i++) begin
      in_valid = 1'b1; in_data = W'(i + 100);
      @(negedge clk);
    end
    check(count == D, $sformatf("count %0d after %0d pushes", count, D));
    check(!in_ready, "in_ready high while full and out_ready low");
    // push and pop together while full
    out_ready = 1'b1; in_data = 16'hBEEF;
    #1;
    check(in_ready, "in_ready low while full and out_ready high");
    @(negedge clk);
    check(count == D, "count changed on simultaneous push and pop");
    in_valid = 1'b0;
    repeat (D + 2) @(negedge clk);
    check(!out_valid && count == 0, "not empty after draining");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      in_valid  = ($urandom % 3) != 0;
      in_data   = W'($urandom);
      out_ready = ($urandom % 2) == 1;
      @(negedge clk);
      check(int'(count) == model.size(), $sformatf("count %0d, model %0d", count, model.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
