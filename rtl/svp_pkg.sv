// svp_pkg: types and constants shared by the Softcore Vector Processor (SVP).
//
// The SVP is a SIMD machine: an instruction controller (IC) broadcasts one
// instruction per cycle to a linear array of 16-bit processing elements (PEs).
// Instructions come in two classes, selected by bit 31:
//   * PE class  (bit 31 = 0): executed by every PE whose block mask is all ones.
//   * IC class  (bit 31 = 1): executed by the IC itself (program flow, loop,
//     IC registers, IC loads/stores).
// Operands of PE instructions can be an IC register broadcast as an immediate,
// which is how constants and table base addresses live in the IC rather than
// in every PE.
//
// The split into two classes, the 8-bit mask, the 16-bit data path, the
// bmsset/bmend pair and MAX/MIN follow the published description. The bit
// layout, the opcode list, register counts and the memory map are this
// design's own choices.
//
// PE instruction layout (pe_instr_t):
//   [31] 0   [30:26] op   [25:22] rd   [21:18] ra   [17:14] rb
//   [13] b_imm (operand B is the immediate)   [12] imm_icreg (immediate is
//   IC register imm[3:0] instead of the sign-extended 12-bit literal)
//   [11:0] imm
// PE register numbers: r0..r7 are the register file on the PE's left,
// r8..r15 the one on its right (shared with the next PE, which sees the same
// registers as its r0..r7).
// bmsset uses the rd field as the condition code (cond_e).
// LD rd, [ra + B] loads; ST rd, [ra + B] stores register rd.
//
// IC instruction layout (ic_instr_t):
//   [31] 1   [30:26] op   [25:22] rd   [21:18] rs   [17:16] 0   [15:0] imm
package svp_pkg;

  parameter int DATA_W   = 16;  // PE data width
  parameter int INSTR_W  = 32;  // instruction word width
  parameter int RF_REGS  = 8;   // registers in one shared register file
  parameter int MASK_W   = 8;   // block mask register width
  parameter int IC_REGS  = 16;  // IC registers
  parameter int ADDR_W   = 16;  // memory controller address width

  // Address that maps to the stream FIFOs: a load pops Stream In, a store
  // pushes Stream Out. Every other address selects shared local memory.
  parameter logic [ADDR_W-1:0] STREAM_ADDR = 16'hFFFF;

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_ADD    = 5'd1,
    OP_SUB    = 5'd2,
    OP_MAX    = 5'd3,   // signed maximum
    OP_MIN    = 5'd4,   // signed minimum
    OP_AND    = 5'd5,
    OP_OR     = 5'd6,
    OP_XOR    = 5'd7,
    OP_SHL    = 5'd8,
    OP_SHR    = 5'd9,   // arithmetic right shift
    OP_MOV    = 5'd10,  // rd = B
    OP_LD     = 5'd11,  // rd = mem[ra + B]
    OP_ST     = 5'd12,  // mem[ra + B] = rd
    OP_BMSSET = 5'd13,  // mask = {mask[6:0], cond(ra, B)}
    OP_BMEND  = 5'd14   // mask = {1, mask[7:1]}
  } pe_op_e;

  typedef enum logic [4:0] {
    IC_NOP  = 5'd0,
    IC_LI   = 5'd1,   // icr[rd] = imm
    IC_ADDI = 5'd2,   // icr[rd] = icr[rs] + imm
    IC_JMP  = 5'd3,   // pc = imm
    IC_BNZ  = 5'd4,   // if (icr[rs] != 0) pc = imm
    IC_LOOP = 5'd5,   // repeat the body pc+1 .. imm icr[rs] times
    IC_LD   = 5'd6,   // icr[rd] = mem[icr[rs] + imm]
    IC_ST   = 5'd7,   // mem[icr[rs] + imm] = icr[rd]
    IC_HALT = 5'd8
  } ic_op_e;

  typedef enum logic [3:0] {
    C_EQ = 4'd0,
    C_NE = 4'd1,
    C_LT = 4'd2,   // signed
    C_GE = 4'd3,
    C_GT = 4'd4,
    C_LE = 4'd5
  } cond_e;

  typedef struct packed {
    logic       is_ic;
    pe_op_e     op;
    logic [3:0] rd;
    logic [3:0] ra;
    logic [3:0] rb;
    logic       b_imm;
    logic       imm_icreg;
    logic [11:0] imm;
  } pe_instr_t;

  typedef struct packed {
    logic       is_ic;
    ic_op_e     op;
    logic [3:0] rd;
    logic [3:0] rs;
    logic [1:0] zero;
    logic [15:0] imm;
  } ic_instr_t;

  // What the IC broadcasts to the PE array each cycle. The immediate is
  // already resolved (IC register value or sign-extended literal).
  typedef struct packed {
    logic       valid;
    pe_op_e     op;
    logic [3:0] rd;
    logic [3:0] ra;
    logic [3:0] rb;
    logic       b_imm;
    word_t      imm;
  } pe_bcast_t;

  // One register-file write port.
  typedef struct packed {
    logic                       we;
    logic [$clog2(RF_REGS)-1:0] addr;
    word_t                      data;
  } rf_wr_t;

  // ---- instruction encoders (used by programs written in testbenches) ----

  function automatic logic [INSTR_W-1:0] pe_rrr(pe_op_e op, logic [3:0] rd, logic [3:0] ra, logic [3:0] rb);
    pe_instr_t i;
    i = '0;
    i.op = op; i.rd = rd; i.ra = ra; i.rb = rb;
    return i;
  endfunction

  function automatic logic [INSTR_W-1:0] pe_rri(pe_op_e op, logic [3:0] rd, logic [3:0] ra, logic [11:0] imm);
    pe_instr_t i;
    i = '0;
    i.op = op; i.rd = rd; i.ra = ra; i.b_imm = 1'b1; i.imm = imm;
    return i;
  endfunction

  // Operand B is IC register icr.
  function automatic logic [INSTR_W-1:0] pe_rrc(pe_op_e op, logic [3:0] rd, logic [3:0] ra, logic [3:0] icr);
    pe_instr_t i;
    i = '0;
    i.op = op; i.rd = rd; i.ra = ra; i.b_imm = 1'b1; i.imm_icreg = 1'b1;
    i.imm = {8'd0, icr};
    return i;
  endfunction

  function automatic logic [INSTR_W-1:0] ic_enc(ic_op_e op, logic [3:0] rd, logic [3:0] rs, logic [15:0] imm);
    ic_instr_t i;
    i = '0;
    i.is_ic = 1'b1; i.op = op; i.rd = rd; i.rs = rs; i.imm = imm;
    return i;
  endfunction

endpackage
