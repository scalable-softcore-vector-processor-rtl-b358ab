// svp_system: a chain of SVP Functional Units.
//
// The SVP is meant to sit in a pipelined stream-processing system: each
// Functional Unit applies one programmed transformation to a data stream, and
// units are chained so that the Stream Out of unit k feeds the Stream In of
// unit k+1 (valid/ready, no extra buffering beyond each unit's own FIFOs).
// Chaining one or more units is the published system architecture; the
// number of units (default 1), the shared start signal and the per-unit
// program port are this design's choices.
//
// Use: write each unit's program with prog_fu selecting the unit, then pulse
// start; all units begin together and a unit waiting for input simply stalls
// on its empty Stream In. running[k] is high until unit k executes HALT.
module svp_system
  import svp_pkg::*;
#(
  parameter int unsigned NUM_FU     = 1,
  parameter int unsigned N_PE       = 128,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned MEM_WORDS  = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned LOOP_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(NUM_FU+1)-1:0]   prog_fu,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]            prog_data,
  input  logic                          start,
  output logic [NUM_FU-1:0]             running,
  input  logic                          sin_valid,
  output logic                          sin_ready,
  input  word_t                         sin_data,
  output logic                          sout_valid,
  input  logic                          sout_ready,
  output word_t                         sout_data,
  output logic [NUM_FU-1:0]             mc_stall,
  output logic [NUM_FU-1:0][N_PE-1:0]   pe_active
);

  // stream link k enters unit k; link NUM_FU leaves the last unit
  logic  link_valid [NUM_FU+1];
  logic  link_ready [NUM_FU+1];
  word_t link_data  [NUM_FU+1];

  assign link_valid[0] = sin_valid;
  assign link_data[0]  = sin_data;
  assign sin_ready     = link_ready[0];
  assign sout_valid    = link_valid[NUM_FU];
  assign sout_data     = link_data[NUM_FU];
  assign link_ready[NUM_FU] = sout_ready;

  for (genvar k = 0; k < int'(NUM_FU); k++) begin : g_fu
    svp_functional_unit #(
      .N_PE       (N_PE),
      .IMEM_DEPTH (IMEM_DEPTH),
      .MEM_WORDS  (MEM_WORDS),
      .FIFO_DEPTH (FIFO_DEPTH),
      .LOOP_DEPTH (LOOP_DEPTH)
    ) u_fu (
      .clk        (clk),
      .rst_n      (rst_n),
      .prog_we    (prog_we && (prog_fu == ($clog2(NUM_FU+1))'(k))),
      .prog_addr  (prog_addr),
      .prog_data  (prog_data),
      .start      (start),
      .running    (running[k]),
      .sin_valid  (link_valid[k]),
      .sin_ready  (link_ready[k]),
      .sin_data   (link_data[k]),
      .sout_valid (link_valid[k+1]),
      .sout_ready (link_ready[k+1]),
      .sout_data  (link_data[k+1]),
      .mc_stall   (mc_stall[k]),
      .pe_active  (pe_active[k])
    );
  end

endmodule
