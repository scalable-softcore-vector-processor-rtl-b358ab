// tb_instruction_controller: self-checking test of the instruction
// controller (with its instruction memory).
// A small program exercises IC registers, nested atomic loops, a loop with a
// zero count, a BNZ loop, JMP, IC loads/stores and PE broadcasts with literal
// and IC-register immediates. The memory controller is modelled by the
// testbench: it stalls every memory instruction for a set number of cycles.
// Checked: the sequence of broadcast PE instructions (each once, with the
// right immediate), IC store address/data, and the exact cycle count
// (one cycle per instruction, plus one after start, one per LOOP and taken
// branch, plus the stall cycles).
module tb_instruction_controller;
  import svp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we = 1'b0;
  logic [5:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        start = 1'b0, running;
  pe_bcast_t   bcast;
  logic        stall, ic_req, ic_we, ic_ld_valid;
  word_t       ic_addr, ic_wdata, ic_ld_data;

  instruction_controller #(.IMEM_DEPTH(64), .LOOP_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  localparam int K = 3;   // stall cycles per memory instruction
  int cnt = 0, n_stall = 0, n_cycles = 0;
  logic memop;
  word_t trace_imm [$];
  pe_op_e trace_op [$];
  word_t st_addr = '0, st_data = '0;
  int n_st = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory controller model
  always_comb begin
    memop = ic_req || (bcast.valid && (bcast.op == OP_LD || bcast.op == OP_ST));
    stall = memop && (cnt < K);
    ic_ld_valid = ic_req && !ic_we && !stall;
    ic_ld_data = 16'h5A5A;
  end
  always @(posedge clk) if (rst_n) begin
    if (stall) begin cnt <= cnt + 1; n_stall++; end
    else cnt <= 0;
    if (running) n_cycles++;
    if (bcast.valid && !stall) begin
      trace_op.push_back(bcast.op);
      trace_imm.push_back(bcast.imm);
    end
    if (ic_req && ic_we && !stall) begin st_addr <= ic_addr; st_data <= ic_wdata; n_st++; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p [$];
    pe_op_e eop [$];
    word_t  eimm [$];
    p.push_back(ic_enc(IC_LI, 5, 0, 16'h1234));          // 0
    p.push_back(ic_enc(IC_LI, 1, 0, 16'd3));             // 1
    p.push_back(ic_enc(IC_LI, 2, 0, 16'd2));             // 2
    p.push_back(ic_enc(IC_LOOP, 0, 1, 16'd7));           // 3  3 times 4..7
    p.push_back(pe_rrc(OP_ADD, 1, 1, 5));                //  4 A (imm = icr5)
    p.push_back(ic_enc(IC_LOOP, 0, 2, 16'd6));           //  5 2 times 6..6
    p.push_back(pe_rri(OP_ADD, 1, 1, 12'h800));          //  6 B (imm = -2048)
    p.push_back(pe_rrr(OP_SUB, 1, 2, 3));                //  7 C
    p.push_back(ic_enc(IC_LI, 3, 0, 16'd0));             // 8
    p.push_back(ic_enc(IC_LOOP, 0, 3, 16'd10));          // 9  zero times
    p.push_back(pe_rrr(OP_XOR, 1, 1, 1));                // 10 D (skipped)
    p.push_back(ic_enc(IC_LI, 4, 0, 16'd2));             // 11
    p.push_back(pe_rri(OP_MOV, 1, 0, 12'd7));            // 12 E
    p.push_back(ic_enc(IC_ADDI, 4, 4, 16'hFFFF));        // 13
    p.push_back(ic_enc(IC_BNZ, 0, 4, 16'd12));           // 14
    p.push_back(ic_enc(IC_JMP, 0, 0, 16'd17));           // 15
    p.push_back(pe_rrr(OP_AND, 1, 1, 1));                // 16 F (skipped)
    p.push_back(ic_enc(IC_LD, 6, 0, 16'h0020));          // 17 icr6 = mem (0x5A5A)
    p.push_back(ic_enc(IC_ST, 6, 5, 16'h0001));          // 18 mem[0x1235] = icr6
    p.push_back(pe_rrc(OP_MAX, 2, 3, 6));                // 19 G (imm = icr6)
    p.push_back(pe_rri(OP_LD, 2, 3, 12'd5));             // 20 PE load
    p.push_back(ic_enc(IC_HALT, 0, 0, 16'd0));           // 21
    p.push_back(pe_rrr(OP_OR, 1, 1, 1));                 // 22 never reached

    for (int o = 0; o < 3; o++) begin
      eop.push_back(OP_ADD); eimm.push_back(16'h1234);
      eop.push_back(OP_ADD); eimm.push_back(16'hF800);
      eop.push_back(OP_ADD); eimm.push_back(16'hF800);
      eop.push_back(OP_SUB); eimm.push_back(16'h0000);
    end
    eop.push_back(OP_MOV); eimm.push_back(16'd7);
    eop.push_back(OP_MOV); eimm.push_back(16'd7);
    eop.push_back(OP_MAX); eimm.push_back(16'h5A5A);
    eop.push_back(OP_LD);  eimm.push_back(16'd5);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (p[a]) begin
      prog_we = 1'b1; prog_addr = 6'(a); prog_data = p[a];
      @(negedge clk);
    end
    prog_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (!running);
    repeat (3) @(negedge clk);

    check(trace_op.size() == eop.size(),
          $sformatf("%0d PE instructions broadcast, expected %0d", trace_op.size(), eop.size()));
    for (int i = 0; i < eop.size() && i < trace_op.size(); i++) begin
      check(trace_op[i] == eop[i], $sformatf("broadcast %0d: op %s, expected %s", i,
                                             trace_op[i].name(), eop[i].name()));
      check(trace_imm[i] == eimm[i], $sformatf("broadcast %0d: imm %h, expected %h", i,
                                               trace_imm[i], eimm[i]));
    end
    check(n_st == 1 && st_addr == 16'h1235 && st_data == 16'h5A5A,
          $sformatf("IC store: %0d stores, [%h] = %h", n_st, st_addr, st_data));
    // 1 after start + 3 LI + 2 LOOP + 3 x (A + 2 LOOP + 2 B + C) + LI + 2 LOOP
    // + LI + (E ADDI BNZ + 1) + (E ADDI BNZ) + 2 JMP + 4 one-cycle + HALT = 42
    check(n_cycles == 42 + 3 * K, $sformatf("%0d cycles, expected %0d", n_cycles, 42 + 3 * K));
    check(n_stall == 3 * K, $sformatf("%0d stall cycles, expected %0d", n_stall, 3 * K));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
