// tb_instr_mem: self-checking test of the instruction memory.
// Writes random words to random addresses, then reads them back through the
// synchronous read port (data one cycle after the address) and checks that
// the output holds while the read enable is low.
module tb_instr_mem;
  import svp_pkg::*;
  localparam int DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we = 1'b0, re = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [INSTR_W-1:0] wdata = '0, rdata;
  logic [INSTR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = 6'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [INSTR_W-1:0] held;
      re = 1'b1; raddr = 6'($urandom);
      @(negedge clk);
      checks++;
      if (rdata != model[raddr]) begin
        failures++; $display("FAIL: read %0d = %h, expected %h", raddr, rdata, model[raddr]);
      end
      held = rdata;
      re = 1'b0; raddr = raddr + 1'b1;
      @(negedge clk);
      checks++;
      if (rdata != held) begin failures++; $display("FAIL: output changed with re low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
