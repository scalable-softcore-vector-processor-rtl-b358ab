// tb_processing_element: self-checking test of one processing element.
// The two neighbouring register files are modelled by the testbench (random
// contents). Random broadcast instructions are applied; the write-back ports,
// memory request and block mask are compared with a reference model written
// here. The mask sequence covers nested bmsset/bmend with true and false
// conditions, so inactive PEs must suppress writes and memory requests while
// still tracking the nesting.
module tb_processing_element;
  import svp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pe_bcast_t bcast = '0;
  word_t  left_regs [RF_REGS], right_regs [RF_REGS];
  rf_wr_t wr_left, wr_right;
  logic   mem_req, mem_we, ld_valid = 1'b0, active;
  word_t  mem_addr, mem_wdata, ld_data = '0;
  logic [MASK_W-1:0] mask;

  processing_element dut (.*);

  int checks = 0, failures = 0;
  logic [MASK_W-1:0] m_mask = '1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t rd_reg(logic [3:0] r);
    return r[3] ? right_regs[r[2:0]] : left_regs[r[2:0]];
  endfunction

  function automatic bit cmp(int c, word_t a, word_t b);
    case (c)
      0: return a == b;
      1: return a != b;
      2: return $signed(a) < $signed(b);
      3: return $signed(a) >= $signed(b);
      4: return $signed(a) > $signed(b);
      5: return $signed(a) <= $signed(b);
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_op_e ops [11] = '{OP_ADD, OP_SUB, OP_MAX, OP_MIN, OP_AND, OP_OR, OP_XOR,
                         OP_SHL, OP_SHR, OP_MOV, OP_NOP};
    int depth = 0;
    int n_inactive = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(mask == 8'hFF && active, "mask not all ones after reset");
    for (int n = 0; n < 3000; n++) begin
      word_t a, b, d, exp_r;
      int sel;
      bit exp_we, act;
      foreach (left_regs[i]) begin left_regs[i] = word_t'($urandom); right_regs[i] = word_t'($urandom); end
      // small values often, so that compares are sometimes equal
      if ($urandom % 2) begin left_regs[1] = 16'd3; right_regs[1] = 16'd3; end
      bcast = '0;
      bcast.valid = ($urandom % 8) != 0;
      bcast.rd = 4'($urandom); bcast.ra = 4'($urandom); bcast.rb = 4'($urandom);
      bcast.b_imm = ($urandom % 3) == 0;
      bcast.imm = word_t'($urandom);
      // bmend is drawn more often than bmsset so that the PE is active for a
      // good share of the ALU operations
      sel = $urandom % 20;
      if (sel < 11) bcast.op = ops[sel];
      else if (sel < 13) begin
        if (depth < 8) begin bcast.op = OP_BMSSET; bcast.rd = 4'($urandom % 6); end
        else bcast.op = OP_NOP;
      end else if (sel < 18) bcast.op = (depth > 0) ? OP_BMEND : OP_NOP;
      else if (sel < 19) bcast.op = OP_LD;
      else bcast.op = OP_ST;
      ld_valid = bcast.op == OP_LD && ($urandom % 2);
      ld_data = word_t'($urandom);
      #1;
      a = rd_reg(bcast.ra);
      b = bcast.b_imm ? bcast.imm : rd_reg(bcast.rb);
      d = rd_reg(bcast.rd);
      act = &m_mask;
      exp_we = 1'b0;
      exp_r = '0;
      case (bcast.op)
        OP_ADD: begin exp_r = a + b; exp_we = 1; end
        OP_SUB: begin exp_r = a - b; exp_we = 1; end
        OP_MAX: begin exp_r = ($signed(a) > $signed(b)) ? a : b; exp_we = 1; end
        OP_MIN: begin exp_r = ($signed(a) < $signed(b)) ? a : b; exp_we = 1; end
        OP_AND: begin exp_r = a & b; exp_we = 1; end
        OP_OR:  begin exp_r = a | b; exp_we = 1; end
        OP_XOR: begin exp_r = a ^ b; exp_we = 1; end
        OP_SHL: begin exp_r = a << b[3:0]; exp_we = 1; end
        OP_SHR: begin exp_r = word_t'($signed(a) >>> b[3:0]); exp_we = 1; end
        OP_MOV: begin exp_r = b; exp_we = 1; end
        OP_LD:  begin exp_r = ld_data; exp_we = ld_valid; end
        default: ;
      endcase
      exp_we = exp_we && bcast.valid && (act || bcast.op == OP_LD);
      if (!act) n_inactive++;
      check(active == act, $sformatf("active %b, expected %b", active, act));
      check(wr_left.we == (exp_we && !bcast.rd[3]) && wr_right.we == (exp_we && bcast.rd[3]),
            $sformatf("op %s write enables L%b R%b, expected %b to r%0d", bcast.op.name(),
                      wr_left.we, wr_right.we, exp_we, bcast.rd));
      if (exp_we) begin
        check((bcast.rd[3] ? wr_right.data : wr_left.data) == exp_r,
              $sformatf("op %s result %h, expected %h", bcast.op.name(),
                        bcast.rd[3] ? wr_right.data : wr_left.data, exp_r));
        check((bcast.rd[3] ? wr_right.addr : wr_left.addr) == bcast.rd[2:0], "write address");
      end
      check(mem_req == (bcast.valid && act && (bcast.op == OP_LD || bcast.op == OP_ST)),
            "mem_req");
      if (mem_req) begin
        check(mem_addr == word_t'(a + b), "mem_addr");
        check(mem_we == (bcast.op == OP_ST), "mem_we");
        if (bcast.op == OP_ST) check(mem_wdata == d, "mem_wdata");
      end
      @(posedge clk);
      if (bcast.valid && bcast.op == OP_BMSSET) begin
        m_mask = {m_mask[6:0], cmp(int'(bcast.rd), a, b)};
        depth++;
      end else if (bcast.valid && bcast.op == OP_BMEND) begin
        m_mask = {1'b1, m_mask[7:1]};
        depth--;
      end
      #1;
      check(mask == m_mask, $sformatf("mask %b, expected %b", mask, m_mask));
      @(negedge clk);
    end
    check(n_inactive > 100, "too few inactive cycles to test masking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
