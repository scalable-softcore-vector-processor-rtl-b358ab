// tb_memory_controller: self-checking test of the memory controller, with
// the replicated local memory attached and both stream FIFOs modelled by the
// testbench (queues with random empty/full behaviour).
// Each test holds one load/store "instruction" on the request ports until
// stall drops, as the instruction controller does, and checks:
//   * local stores are served one per cycle (1 + active requesters cycles),
//   * local loads return for every requester together after 2 cycles,
//   * stream loads hand successive Stream In words to the requesters in
//     index order, waiting while Stream In is empty,
//   * stream stores push data to Stream Out in index order, waiting while
//     it is full,
//   * an instruction with no active requester does not stall.
module tb_memory_controller;
  import svp_pkg::*;
  localparam int NREQ = 5, WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  req [NREQ], we [NREQ], ld_valid [NREQ];
  word_t addr [NREQ], wdata [NREQ], ld_data [NREQ];
  logic  stall, busy;
  logic  sin_valid, sin_pop, sout_ready, sout_push;
  word_t sin_data, sout_data;
  logic  mem_we, mem_re [NREQ];
  logic [5:0] mem_waddr, mem_raddr [NREQ];
  word_t mem_wdata, mem_rdata [NREQ];

  memory_controller #(.NREQ(NREQ), .MEM_WORDS(WORDS)) dut (.*);

  shared_local_memory #(.WIDTH(DATA_W), .WORDS(WORDS), .PORTS(NREQ)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  word_t model [WORDS];
  word_t sin_q [$], sout_q [$];
  bit sin_block = 0, sout_block = 0;
  word_t got [NREQ];
  bit    got_v [NREQ];
  int n_sin_wait = 0, n_sout_wait = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stream models
  function automatic void refresh();
    sin_valid  = sin_q.size() != 0 && !sin_block;
    sin_data   = sin_q.size() != 0 ? sin_q[0] : '0;
    sout_ready = !sout_block;
  endfunction
  always @(posedge clk) if (rst_n) begin
    if (sin_pop) begin
      check(sin_valid, "pop from empty Stream In");
      if (sin_q.size() != 0) void'(sin_q.pop_front());
    end
    if (sout_push) begin
      check(sout_ready, "push into full Stream Out");
      sout_q.push_back(sout_data);
    end
    if (busy && stall && !sin_pop && !sout_push && !mem_we) begin
      if (sin_block) n_sin_wait++;
      if (sout_block) n_sout_wait++;
    end
  end
  always @(negedge clk) begin
    sin_block  = ($urandom % 3) == 0;
    sout_block = ($urandom % 3) == 0;
    refresh();
  end
  always @(posedge clk) if (rst_n) foreach (ld_valid[i]) if (ld_valid[i]) begin
    check(!got_v[i], $sformatf("requester %0d got two load results", i));
    got[i] = ld_data[i]; got_v[i] = 1'b1;
  end

  // hold one instruction until stall drops; returns the cycles it took
  task automatic run_op(input logic [NREQ-1:0] act, input bit is_st,
                        input word_t a [NREQ], input word_t d [NREQ], output int cycles);
    foreach (got_v[i]) got_v[i] = 1'b0;
    foreach (req[i]) begin
      req[i] = act[i]; we[i] = is_st; addr[i] = a[i]; wdata[i] = d[i];
    end
    cycles = 0;
    forever begin
      bit s;
      refresh();
      #1;
      s = stall;        // stall seen in the cycle, before the edge
      @(posedge clk);
      cycles++;
      @(negedge clk);
      if (!s) break;
    end
    foreach (req[i]) req[i] = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a [NREQ], d [NREQ];
    int cyc;
    foreach (req[i]) begin req[i] = 0; we[i] = 0; addr[i] = '0; wdata[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // fill the whole memory through full-width store instructions
    for (int base = 0; base < WORDS; base += NREQ) begin
      foreach (a[i]) begin a[i] = word_t'((base + i) % WORDS); d[i] = word_t'($urandom); end
      run_op('1, 1'b1, a, d, cyc);
      foreach (a[i]) model[a[i]] = d[i];
    end
    for (int round = 0; round < 60; round++) begin
      logic [NREQ-1:0] act;
      int nact;
      act = NREQ'($urandom);
      if (round < 4) act = '1;
      nact = $countones(act);
      // 1. local stores
      foreach (a[i]) begin a[i] = word_t'(($urandom % WORDS)); d[i] = word_t'($urandom); end
      // distinct addresses keep the model order-independent
      foreach (a[i]) a[i] = word_t'((a[0] + 7 * i) % WORDS);
      run_op(act, 1'b1, a, d, cyc);
      foreach (a[i]) if (act[i]) model[a[i]] = d[i];
      check(cyc == (nact == 0 ? 1 : 1 + nact),
            $sformatf("local store: %0d cycles for %0d requesters", cyc, nact));
      // 2. local loads, all at once
      foreach (a[i]) a[i] = word_t'($urandom % WORDS);
      act = '1;
      run_op(act, 1'b0, a, d, cyc);
      check(cyc == 2, $sformatf("local load took %0d cycles", cyc));
      foreach (a[i]) check(got_v[i] && got[i] == model[a[i]],
                           $sformatf("local load %0d: %h, expected %h", i, got[i], model[a[i]]));
      // 3. stream loads
      act = NREQ'($urandom) | 1;
      begin
        word_t exp_w [$];
        exp_w.delete();
        for (int k = 0; k < NREQ; k++) begin
          word_t w;
          w = word_t'($urandom);
          sin_q.push_back(w);
          exp_w.push_back(w);
        end
        foreach (a[i]) a[i] = STREAM_ADDR;
        run_op(act, 1'b0, a, d, cyc);
        foreach (a[i]) if (act[i]) begin
          check(got_v[i] && got[i] == exp_w[0], $sformatf("stream load %0d: %h, expected %h", i, got[i], exp_w[0]));
          void'(exp_w.pop_front());
        end else check(!got_v[i], "inactive requester got stream data");
        check(sin_q.size() == exp_w.size(), $sformatf("Stream In words left over: %0d vs %0d, act %b", sin_q.size(), exp_w.size(), act));
        sin_q.delete();
      end
      // 4. stream stores
      act = NREQ'($urandom) | 2;
      foreach (d[i]) d[i] = word_t'($urandom);
      sout_q.delete();
      run_op(act, 1'b1, a, d, cyc);
      begin
        int k;
        k = 0;
        check(sout_q.size() == $countones(act), "Stream Out word count");
        foreach (d[i]) if (act[i]) begin
          check(k < sout_q.size() && sout_q[k] == d[i], $sformatf("stream store order at %0d: %h vs %h (%0d words, act %b)", i, k < sout_q.size() ? sout_q[k] : 0, d[i], sout_q.size(), act));
          k++;
        end
      end
    end
    // 5. no active requester: no stall
    foreach (req[i]) req[i] = 1'b0;
    #1;
    check(!stall, "stall with no request");
    check(n_sin_wait > 0 && n_sout_wait > 0, "stream waits were not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
