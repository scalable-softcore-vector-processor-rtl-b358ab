// tb_svp_system: end-to-end test of a two-unit SVP chain (16 PEs per unit,
// the array size the published design was first simulated at).
//
// Stream FIFOs are cut to 4 words and the input is held back for the first
// 60 cycles, so that the units meet empty and full streams.
// Unit 0 runs Smith-Waterman (svp_sw_pkg::sw_program) on a random 16-character
// query against a random 48-character database and streams each PE's best
// row score plus the step count into unit 1. Unit 1 (max_program) reduces the
// scores to their maximum by shifting them through its shared register files
// and streams out the maximum and the step count. Both are checked against a
// direct computation of the score matrix; unit 0's cycle count is checked
// against its schedule plus the cycles it waited on its streams.
// Stream In and Stream Out of the chain are throttled at random. Every
// mechanism of the design is counted and must occur at least once: memory
// stalls, waits on an empty Stream In and a full Stream Out, serialised
// local stores, concurrent local loads, partial and nested block masks,
// zero-overhead loop-back, fetch squash after LOOP/JMP, IC memory accesses,
// and words passed between the units. Unit 1 idles for 2000 cycles before it
// reads, so unit 0 meets a full Stream Out.
module tb_svp_system;
  import svp_pkg::*;
  import svp_sw_pkg::*;

  localparam int NFU = 2, N = 16, M = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we = 1'b0;
  logic [1:0]  prog_fu = '0;
  logic [9:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        start = 1'b0;
  logic [NFU-1:0] running, mc_stall;
  logic        sin_valid = 1'b0, sin_ready, sout_valid, sout_ready = 1'b0;
  word_t       sin_data = '0, sout_data;
  logic [NFU-1:0][N-1:0] pe_active;

  svp_system #(.NUM_FU(NFU), .N_PE(N), .FIFO_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  word_t in_q [$], out_q [$];
  int q_chr [], d_chr [], best [];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    sin_valid  <= rst_n && (in_q.size() != 0) && ($urandom % 4 != 0) && (n_cyc0 > 60);
    sin_data   <= (in_q.size() != 0) ? in_q[0] : '0;
    sout_ready <= ($urandom % 2) == 1;
  end
  always @(posedge clk) begin
    if (sin_valid && sin_ready) void'(in_q.pop_front());
    if (sout_valid && sout_ready) out_q.push_back(sout_data);
  end

  // mechanism counters (unit 0 internals, chain link 1)
  int n_stall = 0, n_sin_wait = 0, n_sout_wait = 0, n_lstore = 0, n_lload_multi = 0;
  int n_masked = 0, n_nested = 0, n_loopback = 0, n_squash = 0, n_ic_mem = 0;
  int n_link = 0, n_cyc0 = 0;
  always @(posedge clk) if (rst_n) begin
    int nre;
    if (running[0]) n_cyc0++;
    if (mc_stall[0]) n_stall++;
    if (dut.g_fu[0].u_fu.u_mc.busy_q && dut.g_fu[0].u_fu.u_mc.have_serial &&
        !dut.g_fu[0].u_fu.u_mc.can_serve) begin
      if (dut.g_fu[0].u_fu.u_mc.cap_we_q[dut.g_fu[0].u_fu.u_mc.sel]) n_sout_wait++;
      else n_sin_wait++;
    end
    if (dut.g_fu[0].u_fu.lm_we) n_lstore++;
    nre = 0;
    for (int i = 0; i <= N; i++) nre += int'(dut.g_fu[0].u_fu.lm_re[i]);
    if (nre > 1) n_lload_multi++;
    if (running[0] && pe_active[0] != '1 && pe_active[0] != '0) n_masked++;
    if (dut.g_fu[0].u_fu.g_pe[1].u_pe.mask_q[1:0] == 2'b10) n_nested++;
    if (dut.g_fu[0].u_fu.u_ic.fetch && dut.g_fu[0].u_fu.u_ic.loop_hit &&
        dut.g_fu[0].u_fu.u_ic.lcnt[dut.g_fu[0].u_fu.u_ic.top] > 1) n_loopback++;
    if (dut.g_fu[0].u_fu.u_ic.exec_ic &&
        (dut.g_fu[0].u_fu.u_ic.ci.op == IC_JMP || dut.g_fu[0].u_fu.u_ic.ci.op == IC_LOOP)) n_squash++;
    if (dut.g_fu[0].u_fu.req[N] && !dut.g_fu[0].u_fu.u_mc.busy_q) n_ic_mem++;
    if (dut.link_valid[1] && dut.link_ready[1]) n_link++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p [$];
    int mx;
    q_chr = new[N];
    d_chr = new[M];
    foreach (q_chr[i]) q_chr[i] = 1 + ($urandom % 4);
    foreach (d_chr[j]) d_chr[j] = (j % 5 < 3) ? q_chr[(j * 5) % N] : 1 + ($urandom % 4);
    sw_reference(N, M, q_chr, d_chr, best);
    mx = 0;
    foreach (best[i]) if (best[i] > mx) mx = best[i];
    in_q.push_back(word_t'(M));
    foreach (q_chr[i]) in_q.push_back(word_t'(q_chr[i]));
    foreach (d_chr[j]) in_q.push_back(word_t'(d_chr[j]));
    for (int k = 0; k < N - 1; k++) in_q.push_back('0);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFU; f++) begin
      if (f == 0) sw_program(N, p); else max_program(N, p);
      foreach (p[a]) begin
        prog_we = 1'b1; prog_fu = 2'(f); prog_addr = 10'(a); prog_data = p[a];
        @(negedge clk);
      end
    end
    prog_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (running == '0);
    repeat (30) @(posedge clk);

    check(out_q.size() == 2, $sformatf("%0d words out of the chain, expected 2", out_q.size()));
    if (out_q.size() >= 2) begin
      check(out_q[0] == word_t'(mx), $sformatf("maximum score %0d, expected %0d", out_q[0], mx));
      check(out_q[1] == word_t'(M + N - 1), $sformatf("step count %0d, expected %0d", out_q[1], M + N - 1));
    end
    check(n_cyc0 == sw_cycles(N, M) + n_sin_wait + n_sout_wait,
          $sformatf("unit 0: %0d cycles, expected %0d + %0d waits", n_cyc0, sw_cycles(N, M),
                    n_sin_wait + n_sout_wait));
    check(n_link == N + 1, $sformatf("%0d words passed between units, expected %0d", n_link, N + 1));
    $display("mechanisms: stall=%0d sin_wait=%0d sout_wait=%0d lstore=%0d multi_lload=%0d masked=%0d nested=%0d loopback=%0d squash=%0d ic_mem=%0d link=%0d",
             n_stall, n_sin_wait, n_sout_wait, n_lstore, n_lload_multi, n_masked, n_nested,
             n_loopback, n_squash, n_ic_mem, n_link);
    check(n_stall > 0, "memory stall never happened");
    check(n_sin_wait > 0, "Stream In empty wait never happened");
    check(n_sout_wait > 0, "Stream Out full wait never happened");
    check(n_lstore > 0, "serialised local store never happened");
    check(n_lload_multi > 0, "concurrent local loads never happened");
    check(n_masked > 0, "partial block mask never happened");
    check(n_nested > 0, "nested bmsset never happened");
    check(n_loopback > 0, "loop-back never happened");
    check(n_squash > 0, "fetch squash never happened");
    check(n_ic_mem > 0, "IC memory access never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
