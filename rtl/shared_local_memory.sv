// shared_local_memory: the SVP's shared local memory, built from replicated
// block RAM.
//
// Every PE (and the IC) must be able to read local memory in the same cycle,
// for example to look up a score table. Following the published approach of
// replicated block RAM, the memory is held in ceil(PORTS/2) identical copies
// (bram_1w2r); each copy serves two read ports, and every write goes to all
// copies, so they always hold the same data. Writes are therefore one per
// cycle; the memory controller serialises them.
//
// Interface: PORTS synchronous read ports (re/raddr in, rdata out one cycle
// later, held until the next enabled read) and one write port. Port p is
// served by copy p/2. WORDS (1024 x 16 bit, one 18 kbit block RAM per copy)
// is this design's choice.
module shared_local_memory #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned WORDS = 1024,
  parameter int unsigned PORTS = 129
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re    [PORTS],
  input  logic [$clog2(WORDS)-1:0] raddr [PORTS],
  output logic [WIDTH-1:0]         rdata [PORTS]
);

  localparam int unsigned COPIES = (PORTS + 1) / 2;
  localparam int unsigned AW = $clog2(WORDS);

  for (genvar c = 0; c < int'(COPIES); c++) begin : g_copy
    localparam int unsigned P0 = 2 * c;
    localparam int unsigned P1 = (2 * c + 1 < PORTS) ? 2 * c + 1 : 2 * c;
    logic [WIDTH-1:0] q1;

    bram_1w2r #(.WIDTH(WIDTH), .WORDS(WORDS)) u_copy (
      .clk    (clk),
      .we     (we),
      .waddr  (waddr),
      .wdata  (wdata),
      .re0    (re[P0]),
      .raddr0 (raddr[P0]),
      .rdata0 (rdata[P0]),
      .re1    ((P1 != P0) ? re[P1] : 1'b0),
      .raddr1 ((P1 != P0) ? raddr[P1] : AW'(0)),
      .rdata1 (q1)
    );

    if (P1 != P0) begin : g_second
      assign rdata[P1] = q1;
    end
  end

endmodule
