// processing_element: one 16-bit SIMD processing element of the SVP.
//
// Every PE receives the same instruction from the instruction controller and
// executes it on its own registers: add, subtract, signed MAX/MIN, logic,
// shifts, move, and loads/stores through the memory controller. Conditional
// code is handled with an 8-bit block mask register. `bmsset` compares two
// operands and shifts the result in from the right
// (mask <= {mask[6:0], cond}); `bmend` shifts it back out
// (mask <= {1'b1, mask[7:1]}). A PE is active only while all eight mask bits
// are one, so bmsset/bmend pairs nest up to eight deep. Both instructions run
// in every PE, active or not, so that the nesting stays in step; every other
// instruction is ignored by an inactive PE.
// The mask width, the compare/shift/set behaviour of bmsset, the AND of all
// mask bits and the MAX/MIN operations follow the published description; the
// exact shift-in of the compare result, the bmend behaviour, the opcode set
// and the register mapping are this design's reading of it.
//
// Registers: r0..r7 live in the register file on the left (left_regs),
// r8..r15 in the one on the right (right_regs). Results go back through
// wr_left / wr_right.
// Timing: ALU results and mask updates are written at the rising edge that
// ends the cycle in which the broadcast instruction is valid. For LD/ST the
// PE raises mem_req (with address ra + B and, for ST, data rd) while the
// instruction is held by the IC; the memory controller returns load data with
// ld_valid, and the PE writes rd at that edge.
module processing_element
  import svp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  pe_bcast_t bcast,
  input  word_t     left_regs  [RF_REGS],
  input  word_t     right_regs [RF_REGS],
  output rf_wr_t    wr_left,
  output rf_wr_t    wr_right,
  // memory controller request
  output logic      mem_req,
  output logic      mem_we,
  output word_t     mem_addr,
  output word_t     mem_wdata,
  input  logic      ld_valid,
  input  word_t     ld_data,
  // status
  output logic      active,
  output logic [MASK_W-1:0] mask
);

  localparam int RW = $clog2(RF_REGS);

  logic [MASK_W-1:0] mask_q;
  word_t a, b, d, result;
  logic  cond, wr_en;

  function automatic word_t read_reg(logic [3:0] r, word_t lr [RF_REGS], word_t rr [RF_REGS]);
    return r[3] ? rr[r[RW-1:0]] : lr[r[RW-1:0]];
  endfunction

  assign active = &mask_q;
  assign mask   = mask_q;

  always_comb begin
    a = read_reg(bcast.ra, left_regs, right_regs);
    b = bcast.b_imm ? bcast.imm : read_reg(bcast.rb, left_regs, right_regs);
    d = read_reg(bcast.rd, left_regs, right_regs);
  end

  // ALU
  always_comb begin
    unique case (bcast.op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MAX:  result = ($signed(a) > $signed(b)) ? a : b;
      OP_MIN:  result = ($signed(a) < $signed(b)) ? a : b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SHL:  result = a << b[3:0];
      OP_SHR:  result = word_t'($signed(a) >>> b[3:0]);
      OP_MOV:  result = b;
      default: result = ld_data;   // OP_LD and the rest
    endcase
  end

  // bmsset condition
  always_comb begin
    unique case (cond_e'(bcast.rd))
      C_EQ:    cond = (a == b);
      C_NE:    cond = (a != b);
      C_LT:    cond = ($signed(a) <  $signed(b));
      C_GE:    cond = ($signed(a) >= $signed(b));
      C_GT:    cond = ($signed(a) >  $signed(b));
      C_LE:    cond = ($signed(a) <= $signed(b));
      default: cond = 1'b0;
    endcase
  end

  // register write-back
  always_comb begin
    unique case (bcast.op)
      OP_ADD, OP_SUB, OP_MAX, OP_MIN, OP_AND, OP_OR, OP_XOR,
      OP_SHL, OP_SHR, OP_MOV: wr_en = bcast.valid && active;
      OP_LD:                  wr_en = bcast.valid && ld_valid;
      default:                wr_en = 1'b0;
    endcase
    wr_left.we    = wr_en && !bcast.rd[3];
    wr_left.addr  = bcast.rd[RW-1:0];
    wr_left.data  = result;
    wr_right.we   = wr_en && bcast.rd[3];
    wr_right.addr = bcast.rd[RW-1:0];
    wr_right.data = result;
  end

  // memory request
  assign mem_req   = bcast.valid && active && (bcast.op == OP_LD || bcast.op == OP_ST);
  assign mem_we    = (bcast.op == OP_ST);
  assign mem_addr  = a + b;
  assign mem_wdata = d;

  // block mask
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q <= '1;
    end else if (bcast.valid) begin
      if (bcast.op == OP_BMSSET)     mask_q <= {mask_q[MASK_W-2:0], cond};
      else if (bcast.op == OP_BMEND) mask_q <= {1'b1, mask_q[MASK_W-1:1]};
    end
  end

endmodule
