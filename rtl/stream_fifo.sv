// stream_fifo: synchronous FIFO used for the Stream In and Stream Out ports
// of the SVP functional unit.
//
// The memory controller maps both stream FIFOs into its address space, so PEs
// and the IC reach a data stream with the ordinary load/store instructions.
// That mapping is the published idea; the FIFO itself (depth, handshake) is
// this design's choice: a circular buffer of DEPTH words with a
// valid/ready handshake on each side.
//
// Interface: a word enters when in_valid && in_ready at a rising edge; the
// oldest word is shown on out_data whenever out_valid is high and leaves
// when out_valid && out_ready. out_data is read combinationally from the
// buffer, so a word written at an edge can be read in the next cycle.
// Simultaneous push and pop are allowed, also when full. in_ready is low
// while reset is asserted, so no word is accepted and lost during reset.
module stream_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic push, pop;

  assign out_valid = (cnt != 0);
  assign in_ready  = rst_n && ((cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];
  assign count     = cnt;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

endmodule
