// instr_mem: the instruction controller's local, programmable instruction
// memory.
//
// A host loads the program through the write port before starting the IC;
// the IC fetches through the synchronous read port. Depth (1024 words) and
// the port arrangement are this design's choice; the published design only
// states that instructions come from a local, programmable memory.
//
// Timing: a read with re high at a rising edge presents the word on rdata
// after that edge; rdata holds while re is low. Writes take effect at the
// edge. The contents are not reset.
module instr_mem
  import svp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [INSTR_W-1:0]       wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [INSTR_W-1:0]       rdata
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
