// reg_file: register file shared by the two processing elements on either
// side of it.
//
// In the SVP the register files sit between neighbouring PEs: PE i sees the
// file on its left as r0..r7 and the file on its right as r8..r15, so the
// file between PE i-1 and PE i is reachable from both. This gives storage
// and, at the same time, the path by which PEs pass data along the array:
// PE i-1 writes its r8+k and PE i reads the value as its rk one cycle later.
// Sharing a file between the two adjacent PEs is the published organisation;
// the number of registers (8) and the write-port rules are this design's.
//
// Interface: every register is visible on `regs` (the read ports are the
// muxes inside the PEs). Two write ports: `wr_l` from the PE on the left
// (writing through its r8..r15) and `wr_r` from the PE on the right (writing
// through its r0..r7). Because all PEs run the same instruction, both ports
// never write in the same cycle; if they ever did, `wr_r` would win and an
// assertion reports it.
// Timing: writes take effect at the rising clock edge; reads are
// combinational. Reset clears every register.
module reg_file
  import svp_pkg::*;
#(
  parameter int unsigned REGS = RF_REGS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  rf_wr_t wr_l,
  input  rf_wr_t wr_r,
  output word_t  regs [REGS]
);

  word_t r_q [REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(REGS); i++) r_q[i] <= '0;
    end else begin
      if (wr_l.we) r_q[wr_l.addr] <= wr_l.data;
      if (wr_r.we) r_q[wr_r.addr] <= wr_r.data;
    end
  end

  assign regs = r_q;

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_l.we && wr_r.we && wr_l.addr == wr_r.addr))
    else $error("reg_file: both neighbours write register %0d in one cycle", wr_l.addr);

endmodule
