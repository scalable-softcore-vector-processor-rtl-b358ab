// tb_shared_local_memory: self-checking test of the replicated local memory.
// Writes go to all copies; then every read port (odd port count, so the last
// copy has one used port) reads a different random address in the same
// cycle, and all must return the model's data one cycle later. Also checks
// read-first behaviour when reading the word being written.
module tb_shared_local_memory;
  localparam int W = 16, WORDS = 64, PORTS = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         we = 1'b0;
  logic [5:0]   waddr = '0;
  logic [W-1:0] wdata = '0;
  logic         re    [PORTS];
  logic [5:0]   raddr [PORTS];
  logic [W-1:0] rdata [PORTS];
  logic [W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  shared_local_memory #(.WIDTH(W), .WORDS(WORDS), .PORTS(PORTS)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (re[p]) begin re[p] = 1'b0; raddr[p] = '0; end
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      we = 1'b1; waddr = 6'(a); wdata = W'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      foreach (re[p]) begin re[p] = 1'b1; raddr[p] = 6'($urandom); end
      // one write in the same cycle, read-first on any port reading it
      we = 1'b1; waddr = 6'($urandom); wdata = W'($urandom);
      @(negedge clk);
      foreach (rdata[p]) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin
          failures++;
          $display("FAIL: port %0d addr %0d = %h, expected %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      model[waddr] = wdata;
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
