// tb_reg_file: self-checking test of the shared register file.
// Random writes through the left-neighbour and right-neighbour ports (never
// to the same register in one cycle) are mirrored in a model array; after
// every edge all registers are compared. Also checks the reset value.
module tb_reg_file;
  import svp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rf_wr_t wr_l = '0, wr_r = '0;
  word_t  regs [RF_REGS];
  word_t  model [RF_REGS];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    foreach (regs[i]) begin
      checks++;
      if (regs[i] != '0) begin failures++; $display("FAIL: reset r%0d", i); end
    end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_l.we   = ($urandom % 2) == 1;
      wr_l.addr = 3'($urandom);
      wr_l.data = word_t'($urandom);
      wr_r.we   = ($urandom % 2) == 1;
      wr_r.addr = 3'($urandom);
      if (wr_r.addr == wr_l.addr) wr_r.addr = wr_r.addr + 1'b1;
      wr_r.data = word_t'($urandom);
      @(posedge clk);
      if (wr_l.we) model[wr_l.addr] = wr_l.data;
      if (wr_r.we) model[wr_r.addr] = wr_r.data;
      #1;
      foreach (regs[i]) begin
        checks++;
        if (regs[i] != model[i]) begin
          failures++;
          $display("FAIL: r%0d = %h, expected %h", i, regs[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
