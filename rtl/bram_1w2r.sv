// bram_1w2r: one block-RAM copy with one write port and two read ports.
//
// Shared local memory is built from several of these copies that all take
// the same writes, so that many readers can be served in the same cycle.
// Both read ports are synchronous: the word addressed at a rising edge
// with its enable high appears on the output after that edge and holds until
// the next enabled read. A read of the word being written returns the old
// contents (read-first). The contents are not reset.
module bram_1w2r #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re0,
  input  logic [$clog2(WORDS)-1:0] raddr0,
  output logic [WIDTH-1:0]         rdata0,
  input  logic                     re1,
  input  logic [$clog2(WORDS)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)  mem[waddr] <= wdata;
    if (re0) rdata0 <= mem[raddr0];
    if (re1) rdata1 <= mem[raddr1];
  end

endmodule
