// instruction_controller: program sequencer of the SVP.
//
// The IC fetches instructions from its local, programmable instruction memory
// (instr_mem, inside this module) and splits them into two classes, as the
// published design does: PE-class instructions are broadcast to every PE,
// IC-class instructions are executed here and mainly steer program flow.
// IC registers hold the constants and table base addresses that would
// otherwise occupy PE registers; a PE instruction can name one of them and
// the IC broadcasts its value as the immediate operand.
//
// IC-class instructions (see svp_pkg): LI, ADDI, JMP, BNZ, LOOP, LD, ST,
// HALT. LOOP is the atomic loop instruction: `LOOP rs, end` runs the body
// (the instructions after LOOP up to and including address `end`)
// icr[rs] times, or skips it when icr[rs] is 0. Loop-back happens in the
// fetch stage with no lost cycle; loops nest up to LOOP_DEPTH deep and nested
// loops must end at different addresses. The instruction list, the encoding,
// the loop stack and the two-stage pipeline are this design's choices.
//
// Pipeline: stage 1 reads instr_mem at pc; stage 2 holds the instruction
// (instr_mem's output register) and executes or broadcasts it. A taken
// JMP/BNZ and a LOOP cost one cycle, because the word fetched behind them is
// dropped. While the memory controller asserts `stall` the whole IC holds
// (used for LD/ST, which take two or more cycles).
//
// Interface: prog_* loads the program; `start` (one cycle) begins execution at
// address 0; `running` is high until HALT. bcast goes to the PE array. ic_*
// is the IC's own request port on the memory controller.
module instruction_controller
  import svp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned LOOP_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // program load
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]            prog_data,
  // control
  input  logic  start,
  output logic  running,
  // broadcast to the PEs
  output pe_bcast_t bcast,
  // memory controller
  input  logic  stall,
  output logic  ic_req,
  output logic  ic_we,
  output word_t ic_addr,
  output word_t ic_wdata,
  input  logic  ic_ld_valid,
  input  word_t ic_ld_data
);

  localparam int unsigned PAW = $clog2(IMEM_DEPTH);
  localparam int unsigned LSW = $clog2(LOOP_DEPTH + 1);

  logic              running_q, ir_valid_q;
  logic [PAW-1:0]    pc_q, ir_pc_q;
  logic [INSTR_W-1:0] ir;
  pe_instr_t         pi;
  ic_instr_t         ci;
  word_t             icr [IC_REGS];

  logic [PAW-1:0]    lstart [LOOP_DEPTH];
  logic [PAW-1:0]    lend   [LOOP_DEPTH];
  word_t             lcnt   [LOOP_DEPTH];
  logic [LSW-1:0]    lsp;      // loop stack depth in use
  logic [LSW-1:0]    top;      // lsp - 1: index of the innermost loop

  logic fetch, exec_ic, loop_hit;

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk   (clk),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data),
    .re    (fetch),
    .raddr (pc_q),
    .rdata (ir)
  );

  assign pi = pe_instr_t'(ir);
  assign ci = ic_instr_t'(ir);

  assign running = running_q;
  assign fetch   = running_q && !stall;
  assign exec_ic = running_q && ir_valid_q && !stall && ci.is_ic;
  assign top     = lsp - 1'b1;
  assign loop_hit = (lsp != '0) && (pc_q == lend[top]);

  // broadcast
  always_comb begin
    bcast.valid = running_q && ir_valid_q && !pi.is_ic;
    bcast.op    = pi.op;
    bcast.rd    = pi.rd;
    bcast.ra    = pi.ra;
    bcast.rb    = pi.rb;
    bcast.b_imm = pi.b_imm;
    bcast.imm   = pi.imm_icreg ? icr[pi.imm[3:0]] : word_t'($signed(pi.imm));
  end

  // IC memory port
  assign ic_req   = running_q && ir_valid_q && ci.is_ic && (ci.op == IC_LD || ci.op == IC_ST);
  assign ic_we    = (ci.op == IC_ST);
  assign ic_addr  = icr[ci.rs] + ci.imm;
  assign ic_wdata = icr[ci.rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q  <= 1'b0;
      ir_valid_q <= 1'b0;
      pc_q       <= '0;
      ir_pc_q    <= '0;
      lsp        <= '0;
      for (int i = 0; i < IC_REGS; i++) icr[i] <= '0;
      for (int i = 0; i < int'(LOOP_DEPTH); i++) begin
        lstart[i] <= '0;
        lend[i]   <= '0;
        lcnt[i]   <= '0;
      end
    end else if (start) begin
      running_q  <= 1'b1;
      ir_valid_q <= 1'b0;
      pc_q       <= '0;
      lsp        <= '0;
    end else begin
      if (ic_ld_valid) icr[ci.rd] <= ic_ld_data;

      if (fetch) begin
        // sequential fetch, with zero-overhead loop-back
        ir_valid_q <= 1'b1;
        ir_pc_q    <= pc_q;
        pc_q       <= pc_q + 1'b1;
        if (loop_hit) begin
          if (lcnt[top] > 1) begin
            pc_q      <= lstart[top];
            lcnt[top] <= lcnt[top] - 1'b1;
          end else begin
            lsp <= lsp - 1'b1;
          end
        end

        if (exec_ic) begin
          unique case (ci.op)
            IC_LI:   icr[ci.rd] <= ci.imm;
            IC_ADDI: icr[ci.rd] <= icr[ci.rs] + ci.imm;
            IC_JMP: begin
              pc_q       <= PAW'(ci.imm);
              ir_valid_q <= 1'b0;
              lsp        <= lsp;
              lcnt       <= lcnt;
            end
            IC_BNZ: if (icr[ci.rs] != '0) begin
              pc_q       <= PAW'(ci.imm);
              ir_valid_q <= 1'b0;
              lsp        <= lsp;
              lcnt       <= lcnt;
            end
            IC_LOOP: begin
              ir_valid_q <= 1'b0;
              lcnt       <= lcnt;
              if (icr[ci.rs] == '0) begin
                pc_q <= PAW'(ci.imm) + 1'b1;
                lsp  <= lsp;
              end else begin
                pc_q        <= ir_pc_q + 1'b1;
                lstart[lsp] <= ir_pc_q + 1'b1;
                lend[lsp]   <= PAW'(ci.imm);
                lcnt[lsp]   <= icr[ci.rs];
                lsp         <= lsp + 1'b1;
              end
            end
            IC_HALT: begin
              running_q  <= 1'b0;
              ir_valid_q <= 1'b0;
            end
            default: ;
          endcase
        end
      end
    end
  end

  a_loop_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    exec_ic && ci.op == IC_LOOP && icr[ci.rs] != '0 |-> lsp < LSW'(LOOP_DEPTH))
    else $error("instruction_controller: loop stack overflow");

endmodule
