// memory_controller: gives the PEs and the IC concurrent access to shared
// local memory and to the memory-mapped stream FIFOs.
//
// Requesters 0..NREQ-2 are the PEs and requester NREQ-1 is the IC. All
// requesters that are active in one broadcast LD/ST instruction raise req in
// the same cycle. The controller then works in two ways:
//   * Loads from local memory are served all at once: every requester has its
//     own read port on the replicated block RAM (shared_local_memory), so the
//     data for all of them returns together one cycle after the request.
//   * Stores to local memory (one write port, common to all copies) and every
//     access to STREAM_ADDR (Stream In for loads, Stream Out for stores) are
//     served one requester per cycle, lowest index first. A stream load waits
//     while Stream In is empty, a stream store while Stream Out is full.
// Memory-mapped stream FIFOs and replicated block RAM are the published
// design; the serialisation order, the single stream address and the timing
// below are this design's choices.
//
// Handshake with the IC: `stall` is high while the current LD/ST instruction
// must be held. When a request appears with the controller idle, stall is
// high, the local loads start and all addresses and store data are captured
// (so a load completing early cannot change another requester's address).
// In the following cycles `busy` is high, local-load data is returned with
// ld_valid, and the serial requests are served; stall drops in the cycle in
// which the last one is served, and the instruction retires at that edge.
// An instruction with no active requester never stalls.
module memory_controller
  import svp_pkg::*;
#(
  parameter int unsigned NREQ      = 129,   // PEs + 1 (the IC)
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  // requesters
  input  logic  req   [NREQ],
  input  logic  we    [NREQ],
  input  word_t addr  [NREQ],
  input  word_t wdata [NREQ],
  output logic  ld_valid [NREQ],
  output word_t ld_data  [NREQ],
  output logic  stall,
  output logic  busy,
  // stream in (FIFO read side)
  input  logic  sin_valid,
  output logic  sin_pop,
  input  word_t sin_data,
  // stream out (FIFO write side)
  input  logic  sout_ready,
  output logic  sout_push,
  output word_t sout_data,
  // shared local memory
  output logic                         mem_we,
  output logic [$clog2(MEM_WORDS)-1:0] mem_waddr,
  output word_t                        mem_wdata,
  output logic                         mem_re    [NREQ],
  output logic [$clog2(MEM_WORDS)-1:0] mem_raddr [NREQ],
  input  word_t                        mem_rdata [NREQ]
);

  localparam int unsigned MAW = $clog2(MEM_WORDS);
  localparam int unsigned IW  = $clog2(NREQ);

  logic            busy_q;
  logic [NREQ-1:0] pending_q, lload_q, pending_next;
  logic [NREQ-1:0] cap_we_q, cap_stream_q;
  word_t           cap_addr_q  [NREQ];
  word_t           cap_wdata_q [NREQ];

  logic            any_req, issue;
  logic            have_serial, can_serve, serve;
  logic [IW-1:0]   sel;

  always_comb begin
    any_req = 1'b0;
    for (int i = 0; i < int'(NREQ); i++) any_req |= req[i];
  end
  assign issue = !busy_q && any_req;

  // lowest-index pending requester
  always_comb begin
    sel = '0;
    have_serial = 1'b0;
    for (int i = int'(NREQ) - 1; i >= 0; i--) begin
      if (pending_q[i]) begin
        sel = IW'(i);
        have_serial = 1'b1;
      end
    end
  end

  always_comb begin
    if (!cap_stream_q[sel])  can_serve = 1'b1;
    else if (cap_we_q[sel])  can_serve = sout_ready;
    else                     can_serve = sin_valid;
  end
  assign serve = busy_q && have_serial && can_serve;

  always_comb begin
    pending_next = pending_q;
    if (serve) pending_next[sel] = 1'b0;
  end

  assign stall = issue || (busy_q && (pending_next != '0));
  assign busy  = busy_q;

  // local memory reads start at issue, from the live addresses
  for (genvar i = 0; i < int'(NREQ); i++) begin : g_port
    assign mem_re[i]    = issue && req[i] && !we[i] && (addr[i] != STREAM_ADDR);
    assign mem_raddr[i] = addr[i][MAW-1:0];
    assign ld_valid[i]  = lload_q[i] ||
                          (serve && sel == IW'(i) && cap_stream_q[i] && !cap_we_q[i]);
    assign ld_data[i]   = lload_q[i] ? mem_rdata[i] : sin_data;
  end

  // serial service
  assign mem_we    = serve && cap_we_q[sel] && !cap_stream_q[sel];
  assign mem_waddr = cap_addr_q[sel][MAW-1:0];
  assign mem_wdata = cap_wdata_q[sel];
  assign sout_push = serve && cap_we_q[sel] && cap_stream_q[sel];
  assign sout_data = cap_wdata_q[sel];
  assign sin_pop   = serve && !cap_we_q[sel] && cap_stream_q[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      pending_q <= '0;
      lload_q   <= '0;
    end else if (issue) begin
      busy_q <= 1'b1;
      for (int i = 0; i < int'(NREQ); i++) begin
        pending_q[i] <= req[i] && (we[i] || addr[i] == STREAM_ADDR);
        lload_q[i]   <= req[i] && !we[i] && addr[i] != STREAM_ADDR;
      end
    end else if (busy_q) begin
      lload_q   <= '0;
      pending_q <= pending_next;
      if (pending_next == '0) busy_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      for (int i = 0; i < int'(NREQ); i++) begin
        cap_we_q[i]     <= we[i];
        cap_stream_q[i] <= (addr[i] == STREAM_ADDR);
        cap_addr_q[i]   <= addr[i];
        cap_wdata_q[i]  <= wdata[i];
      end
    end
  end

  a_no_req_while_other_op: assert property (@(posedge clk) disable iff (!rst_n)
    busy_q && !stall |=> !busy_q)
    else $error("memory_controller: busy after releasing the IC");

endmodule
