// tb_svp_functional_unit: end-to-end test of the SVP functional unit at its
// default size (128 PEs), running Smith-Waterman local alignment.
//
// The program (built below with the svp_pkg encoders) maps one query
// character to each PE and streams the database sequence through the array:
// in step t, PE i scores database character t-i against its query character.
// Character and score move from PE to PE through the shared register files
// (PE i writes its r8/r9, PE i+1 reads them as r0/r1 in the next step).
// PE 0 alone (selected with bmsset on its index) pops the next database
// character from Stream In. Gap, mismatch and match scores sit in IC
// registers and reach the PEs as broadcast immediates. At the end each PE's
// best row score goes through local memory (serialised stores, concurrent
// loads) to Stream Out, followed by the step count written by the IC.
//
// Stream In: M, then the N query characters, the M database characters and
// N-1 padding zeros. Characters are 1..4; 0 marks padding and is excluded
// from the score by a nested bmsset block.
// The checker recomputes the score matrix in plain SystemVerilog, compares
// every PE's best score, and checks the cycle count against the schedule of
// the program. Stream In and Stream Out are throttled at random so that empty
// and full FIFOs stall the memory controller; each mechanism is counted and
// must occur at least once.
module tb_svp_functional_unit;
  import svp_pkg::*;

  localparam int N  = 128;        // must match the unit's default N_PE
  localparam int M  = 64;         // database length
  localparam int S  = M + N - 1;  // systolic steps
  localparam int MATCH = 2, MISMATCH = -1, GAP = 1;
  localparam int LMBASE = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         prog_we = 1'b0;
  logic [9:0]   prog_addr = '0;
  logic [31:0]  prog_data = '0;
  logic         start = 1'b0, running;
  logic         sin_valid = 1'b0, sin_ready;
  word_t        sin_data = '0;
  logic         sout_valid, sout_ready = 1'b0;
  word_t        sout_data;
  logic         mc_stall;
  logic [N-1:0] pe_active;

  svp_functional_unit dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  word_t in_q [$];
  word_t out_q [$];
  int q_chr [N];
  int d_chr [M];
  int exp_best [N];
  bit throttle = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program ----------------
  localparam int LOOP_END = 29;  // last instruction of the step loop
  localparam int STEP_CYCLES = 20;  // 19 instructions, the stream load takes 2 cycles
  initial begin
    prog.push_back(ic_enc(IC_LI,   1, 0, 16'(GAP)));            // 0
    prog.push_back(ic_enc(IC_LI,   2, 0, 16'(MISMATCH)));       // 1
    prog.push_back(ic_enc(IC_LI,   3, 0, 16'(MATCH - MISMATCH)));// 2
    prog.push_back(ic_enc(IC_LI,   4, 0, 16'(N)));              // 3
    prog.push_back(ic_enc(IC_LI,   6, 0, 16'(LMBASE)));         // 4
    prog.push_back(ic_enc(IC_LD,   5, 0, STREAM_ADDR));         // 5  icr5 = M
    prog.push_back(pe_rri(OP_LD,   6, 2, 12'hFFF));             // 6  r6 = query char
    prog.push_back(ic_enc(IC_LOOP, 0, 4, 16'd8));               // 7  N times:
    prog.push_back(pe_rri(OP_ADD,  10, 2, 12'd1));              // 8    r10 = r2 + 1 (index)
    prog.push_back(ic_enc(IC_ADDI, 5, 5, 16'(N - 1)));          // 9  icr5 = M + N - 1
    prog.push_back(ic_enc(IC_LOOP, 0, 5, 16'(LOOP_END)));       // 10 per step:
    prog.push_back(pe_rri(OP_BMSSET, C_EQ, 2, 12'd0));          // 11   if index == 0
    prog.push_back(pe_rri(OP_LD,   0, 2, 12'hFFF));             // 12     r0 = stream
    prog.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                  // 13
    prog.push_back(pe_rrr(OP_MAX,  3, 1, 5));                   // 14   r3 = max(up, left)
    prog.push_back(pe_rrc(OP_SUB,  3, 3, 1));                   // 15   r3 -= gap
    prog.push_back(pe_rrc(OP_ADD,  4, 4, 2));                   // 16   diag += mismatch
    prog.push_back(pe_rrr(OP_BMSSET, C_EQ, 0, 6));              // 17   if char == query
    prog.push_back(pe_rrc(OP_ADD,  4, 4, 3));                   // 18     diag += match-mismatch
    prog.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                  // 19
    prog.push_back(pe_rrr(OP_MAX,  3, 3, 4));                   // 20
    prog.push_back(pe_rri(OP_MAX,  5, 3, 12'd0));               // 21   h = max(.., 0)
    prog.push_back(pe_rrr(OP_MOV,  4, 0, 1));                   // 22   diag = up
    prog.push_back(pe_rri(OP_BMSSET, C_NE, 0, 12'd0));          // 23   if char != 0
    prog.push_back(pe_rrr(OP_BMSSET, C_GT, 5, 7));              // 24     if h > best
    prog.push_back(pe_rrr(OP_MOV,  7, 0, 5));                   // 25       best = h
    prog.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                  // 26
    prog.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                  // 27
    // pass character and score to the right neighbour
    prog.push_back(pe_rrr(OP_MOV,  8, 0, 0));                   // 28
    prog.push_back(pe_rrr(OP_MOV,  9, 0, 5));                   // 29
    prog.push_back(pe_rrc(OP_ST,   7, 2, 6));                   // 30 lmem[16+i] = best
    prog.push_back(pe_rrr(OP_XOR,  3, 3, 3));                   // 31 r3 = 0
    prog.push_back(pe_rrc(OP_LD,   3, 2, 6));                   // 32 r3 = lmem[16+i]
    prog.push_back(pe_rrr(OP_XOR,  4, 4, 4));                   // 33 r4 = 0
    prog.push_back(pe_rri(OP_ST,   3, 4, 12'hFFF));             // 34 stream out r3
    prog.push_back(ic_enc(IC_JMP,  0, 0, 16'd37));              // 35
    prog.push_back(ic_enc(IC_LI,   5, 0, 16'hDEAD));            // 36 skipped
    prog.push_back(ic_enc(IC_ST,   5, 0, STREAM_ADDR));         // 37 stream out icr5
    prog.push_back(ic_enc(IC_HALT, 0, 0, 16'd0));               // 38
  end

  // ---------------- reference ----------------
  initial begin
    int h [N+1][M+1];
    for (int i = 0; i < N; i++) q_chr[i] = 1 + ($urandom % 4);
    for (int j = 0; j < M; j++) d_chr[j] = (j % 7 < 4) ? q_chr[(j * 3) % N] : 1 + ($urandom % 4);
    for (int i = 0; i <= N; i++) for (int j = 0; j <= M; j++) h[i][j] = 0;
    for (int i = 1; i <= N; i++) begin
      exp_best[i-1] = 0;
      for (int j = 1; j <= M; j++) begin
        int v;
        v = h[i-1][j-1] + ((q_chr[i-1] == d_chr[j-1]) ? MATCH : MISMATCH);
        if (h[i-1][j] - GAP > v) v = h[i-1][j] - GAP;
        if (h[i][j-1] - GAP > v) v = h[i][j-1] - GAP;
        if (v < 0) v = 0;
        h[i][j] = v;
        if (v > exp_best[i-1]) exp_best[i-1] = v;
      end
    end
    in_q.push_back(word_t'(M));
    for (int i = 0; i < N; i++) in_q.push_back(word_t'(q_chr[i]));
    for (int j = 0; j < M; j++) in_q.push_back(word_t'(d_chr[j]));
    for (int k = 0; k < N - 1; k++) in_q.push_back('0);
  end

  // ---------------- stream drivers ----------------
  always @(negedge clk) begin
    sin_valid  <= rst_n && (in_q.size() != 0) && (!throttle || ($urandom % 4 != 0));
    sin_data   <= (in_q.size() != 0) ? in_q[0] : '0;
    sout_ready <= !throttle || ($urandom % 3 != 0);
  end
  always @(posedge clk) begin
    if (sin_valid && sin_ready) void'(in_q.pop_front());
    if (sout_valid && sout_ready) out_q.push_back(sout_data);
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_sin_wait = 0, n_sout_wait = 0, n_lstore = 0, n_lload_multi = 0;
  int n_masked = 0, n_nested = 0, n_loopback = 0, n_squash = 0, n_sin_pop = 0;
  int n_ic_mem = 0, n_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    int nre;
    if (running) n_cycles++;
    if (mc_stall) n_stall++;
    if (dut.u_mc.busy_q && dut.u_mc.have_serial && !dut.u_mc.can_serve) begin
      if (dut.u_mc.cap_we_q[dut.u_mc.sel]) n_sout_wait++; else n_sin_wait++;
    end
    if (dut.u_mc.sin_pop) n_sin_pop++;
    if (dut.lm_we) n_lstore++;
    nre = 0;
    for (int i = 0; i <= N; i++) nre += int'(dut.lm_re[i]);
    if (nre > 1) n_lload_multi++;
    if (running && pe_active != '1 && pe_active != '0) n_masked++;
    if (dut.g_pe[1].u_pe.mask_q[1:0] == 2'b10) n_nested++;
    if (dut.u_ic.fetch && dut.u_ic.loop_hit && dut.u_ic.lcnt[dut.u_ic.top] > 1) n_loopback++;
    if (dut.u_ic.exec_ic && (dut.u_ic.ci.op == IC_JMP || dut.u_ic.ci.op == IC_LOOP)) n_squash++;
    if (dut.req[N] && !dut.u_mc.busy_q) n_ic_mem++;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  task automatic run_once(input bit thr, output int cycles, output int waits);
    int w0;
    throttle = thr;
    out_q.delete();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    w0 = n_sin_wait + n_sout_wait;
    n_cycles = 0;
    wait (!running);
    repeat (40) @(posedge clk);
    cycles = n_cycles;
    waits = n_sin_wait + n_sout_wait - w0;
  endtask

  initial begin
    int cyc, waits, expected_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (prog[a]) begin
      prog_we = 1'b1; prog_addr = 10'(a); prog_data = prog[a];
      @(negedge clk);
    end
    prog_we = 1'b0;

    // run 1: throttled streams
    run_once(1'b1, cyc, waits);
    check(out_q.size() == N + 1, $sformatf("stream out length %0d, expected %0d", out_q.size(), N + 1));
    for (int i = 0; i < N && i < out_q.size(); i++)
      check(out_q[i] == word_t'(exp_best[i]),
            $sformatf("PE %0d best score %0d, expected %0d", i, $signed(out_q[i]), exp_best[i]));
    if (out_q.size() == N + 1)
      check(out_q[N] == word_t'(S), $sformatf("IC store %0d, expected %0d", out_q[N], S));

    // schedule of the program with streams never empty/full:
    // 1 fetch + 5 LI + 2 IC LD + (1+N) query load + 2 LOOP + N index
    // + 1 ADDI + 2 LOOP + STEP_CYCLES*S loop body + (1+N) local store + 1 XOR
    // + 2 local load + 1 XOR + (1+N) stream store + 2 JMP + 2 IC ST + 1 HALT
    expected_cycles = 1 + 5 + 2 + (1 + N) + 2 + N + 1 + 2 + STEP_CYCLES * S
                      + (1 + N) + 1 + 2 + 1 + (1 + N) + 2 + 2 + 1;
    check(cyc == expected_cycles + waits,
          $sformatf("cycles %0d, expected %0d + %0d stream waits", cyc, expected_cycles, waits));

    // run 2: same input, streams never throttled: exact cycle count
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    in_q.push_back(word_t'(M));
    for (int i = 0; i < N; i++) in_q.push_back(word_t'(q_chr[i]));
    for (int j = 0; j < M; j++) in_q.push_back(word_t'(d_chr[j]));
    for (int k = 0; k < N - 1; k++) in_q.push_back('0);
    repeat (20) @(negedge clk);   // let Stream In fill
    run_once(1'b0, cyc, waits);
    check(cyc == expected_cycles + waits,
          $sformatf("unthrottled cycles %0d, expected %0d + %0d", cyc, expected_cycles, waits));
    for (int i = 0; i < N && i < out_q.size(); i++)
      check(out_q[i] == word_t'(exp_best[i]), $sformatf("run 2: PE %0d best score", i));
    $display("cycles per step %0d; %0d cells per PE in %0d cycles = %0.2f Mcell-updates/s per PE at 150 MHz",
             STEP_CYCLES, M, cyc, real'(M) * 150.0 / real'(cyc));

    $display("mechanisms: stall=%0d sin_wait=%0d sout_wait=%0d sin_pop=%0d lstore=%0d multi_lload=%0d masked=%0d nested=%0d loopback=%0d squash=%0d ic_mem=%0d",
             n_stall, n_sin_wait, n_sout_wait, n_sin_pop, n_lstore, n_lload_multi,
             n_masked, n_nested, n_loopback, n_squash, n_ic_mem);
    check(n_stall > 0, "memory-controller stall never happened");
    check(n_sin_wait > 0, "Stream In empty wait never happened");
    check(n_sout_wait > 0, "Stream Out full wait never happened");
    check(n_lstore > 0, "serialised local store never happened");
    check(n_lload_multi > 0, "concurrent local loads never happened");
    check(n_masked > 0, "partial block mask never happened");
    check(n_nested > 0, "nested bmsset never happened");
    check(n_loopback > 0, "zero-overhead loop-back never happened");
    check(n_squash > 0, "jump/loop fetch squash never happened");
    check(n_ic_mem > 0, "IC memory access never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
