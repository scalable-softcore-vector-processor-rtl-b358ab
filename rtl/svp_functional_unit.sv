// svp_functional_unit: one Functional Unit of the Softcore Vector Processor.
//
// A Functional Unit applies one programmed transformation to a data stream.
// It holds:
//   * an instruction controller (with its instruction memory) that broadcasts
//     one instruction per cycle,
//   * a linear array of N_PE processing elements working in SIMD,
//   * N_PE+1 register files placed between the PEs; file k is shared by
//     PE k-1 (as its r8..r15) and PE k (as its r0..r7), so data moves along
//     the array through the files. File 0 is reached only by PE 0 and file
//     N_PE only by the last PE;
//   * a memory controller giving all PEs and the IC concurrent access to
//     shared local memory (replicated block RAM) and to the Stream In and
//     Stream Out FIFOs, which appear at address STREAM_ADDR.
// This arrangement is the published block diagram. Chaining several units
// (Stream Out of one into Stream In of the next) is done outside this module.
//
// Defaults: 128 PEs of 16 bits (the largest published configuration);
// instruction memory 1024 words, local memory 1024 words per copy,
// 16-word stream FIFOs and 4 nested loops are this design's choices.
//
// Use: reset, write the program through prog_*, pulse start. The unit runs
// until HALT (running falls). Stream words enter on sin_* and leave on sout_*
// (valid/ready; a word moves when both are high at a rising edge).
// mc_stall and pe_active are status outputs for observation.
module svp_functional_unit
  import svp_pkg::*;
#(
  parameter int unsigned N_PE       = 128,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned MEM_WORDS  = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned LOOP_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]            prog_data,
  input  logic                          start,
  output logic                          running,
  input  logic                          sin_valid,
  output logic                          sin_ready,
  input  word_t                         sin_data,
  output logic                          sout_valid,
  input  logic                          sout_ready,
  output word_t                         sout_data,
  output logic                          mc_stall,
  output logic [N_PE-1:0]               pe_active
);

  localparam int unsigned NREQ = N_PE + 1;
  localparam int unsigned MAW  = $clog2(MEM_WORDS);

  pe_bcast_t bcast;
  logic      stall;

  // register files
  word_t  rf_regs [N_PE+1][RF_REGS];
  rf_wr_t pe_wr_left  [N_PE];
  rf_wr_t pe_wr_right [N_PE];

  // memory controller request ports (PEs 0..N_PE-1, IC at N_PE)
  logic  req   [NREQ];
  logic  we    [NREQ];
  word_t addr  [NREQ];
  word_t wdata [NREQ];
  logic  ld_valid [NREQ];
  word_t ld_data  [NREQ];

  // local memory
  logic             lm_we;
  logic [MAW-1:0]   lm_waddr;
  word_t            lm_wdata;
  logic             lm_re    [NREQ];
  logic [MAW-1:0]   lm_raddr [NREQ];
  word_t            lm_rdata [NREQ];

  // stream FIFOs
  logic  sin_q_valid, sin_pop, sout_q_ready, sout_push;
  word_t sin_q_data, sout_q_data;

  instruction_controller #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .LOOP_DEPTH (LOOP_DEPTH)
  ) u_ic (
    .clk         (clk),
    .rst_n       (rst_n),
    .prog_we     (prog_we),
    .prog_addr   (prog_addr),
    .prog_data   (prog_data),
    .start       (start),
    .running     (running),
    .bcast       (bcast),
    .stall       (stall),
    .ic_req      (req[N_PE]),
    .ic_we       (we[N_PE]),
    .ic_addr     (addr[N_PE]),
    .ic_wdata    (wdata[N_PE]),
    .ic_ld_valid (ld_valid[N_PE]),
    .ic_ld_data  (ld_data[N_PE])
  );

  for (genvar k = 0; k <= int'(N_PE); k++) begin : g_rf
    rf_wr_t from_left, from_right;
    if (k == 0) begin : g_first
      assign from_left = '0;
    end else begin : g_mid_l
      assign from_left = pe_wr_right[k-1];
    end
    if (k == int'(N_PE)) begin : g_last
      assign from_right = '0;
    end else begin : g_mid_r
      assign from_right = pe_wr_left[k];
    end
    reg_file u_rf (
      .clk  (clk),
      .rst_n(rst_n),
      .wr_l (from_left),
      .wr_r (from_right),
      .regs (rf_regs[k])
    );
  end

  for (genvar i = 0; i < int'(N_PE); i++) begin : g_pe
    logic [MASK_W-1:0] mask_unused;
    processing_element u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .bcast      (bcast),
      .left_regs  (rf_regs[i]),
      .right_regs (rf_regs[i+1]),
      .wr_left    (pe_wr_left[i]),
      .wr_right   (pe_wr_right[i]),
      .mem_req    (req[i]),
      .mem_we     (we[i]),
      .mem_addr   (addr[i]),
      .mem_wdata  (wdata[i]),
      .ld_valid   (ld_valid[i]),
      .ld_data    (ld_data[i]),
      .active     (pe_active[i]),
      .mask       (mask_unused)
    );
  end

  memory_controller #(
    .NREQ      (NREQ),
    .MEM_WORDS (MEM_WORDS)
  ) u_mc (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .we         (we),
    .addr       (addr),
    .wdata      (wdata),
    .ld_valid   (ld_valid),
    .ld_data    (ld_data),
    .stall      (stall),
    .busy       (),
    .sin_valid  (sin_q_valid),
    .sin_pop    (sin_pop),
    .sin_data   (sin_q_data),
    .sout_ready (sout_q_ready),
    .sout_push  (sout_push),
    .sout_data  (sout_q_data),
    .mem_we     (lm_we),
    .mem_waddr  (lm_waddr),
    .mem_wdata  (lm_wdata),
    .mem_re     (lm_re),
    .mem_raddr  (lm_raddr),
    .mem_rdata  (lm_rdata)
  );

  shared_local_memory #(
    .WIDTH (DATA_W),
    .WORDS (MEM_WORDS),
    .PORTS (NREQ)
  ) u_lmem (
    .clk   (clk),
    .we    (lm_we),
    .waddr (lm_waddr),
    .wdata (lm_wdata),
    .re    (lm_re),
    .raddr (lm_raddr),
    .rdata (lm_rdata)
  );

  stream_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_stream_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sin_valid),
    .in_ready  (sin_ready),
    .in_data   (sin_data),
    .out_valid (sin_q_valid),
    .out_ready (sin_pop),
    .out_data  (sin_q_data),
    .count     ()
  );

  stream_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_stream_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sout_push),
    .in_ready  (sout_q_ready),
    .in_data   (sout_q_data),
    .out_valid (sout_valid),
    .out_ready (sout_ready),
    .out_data  (sout_data),
    .count     ()
  );

  assign mc_stall = stall;

endmodule
