// tb_svp_system_full: the SVP system at its default parameters (one
// Functional Unit of 128 16-bit PEs) through one complete Smith-Waterman run:
// a random 128-character query against a 96-character database.
// Checks every PE's best row score against a direct computation of the score
// matrix, the step count written by the IC, and the exact cycle count (the
// program's schedule plus the cycles spent waiting on a throttled Stream In
// and Stream Out). Prints the resulting cell-update rate per PE at 150 MHz.
module tb_svp_system_full;
  import svp_pkg::*;
  import svp_sw_pkg::*;

  localparam int N = 128, M = 96;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we = 1'b0;
  logic [0:0]  prog_fu = '0;
  logic [9:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic        start = 1'b0;
  logic [0:0]  running, mc_stall;
  logic        sin_valid = 1'b0, sin_ready, sout_valid, sout_ready = 1'b0;
  word_t       sin_data = '0, sout_data;
  logic [0:0][N-1:0] pe_active;

  svp_system dut (.*);

  int checks = 0, failures = 0;
  word_t in_q [$], out_q [$];
  int q_chr [], d_chr [], best [];
  int n_cyc = 0, n_wait = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    sin_valid  <= rst_n && (in_q.size() != 0) && ($urandom % 4 != 0);
    sin_data   <= (in_q.size() != 0) ? in_q[0] : '0;
    sout_ready <= ($urandom % 3) != 0;
  end
  always @(posedge clk) begin
    if (sin_valid && sin_ready) void'(in_q.pop_front());
    if (sout_valid && sout_ready) out_q.push_back(sout_data);
    if (rst_n && running[0]) n_cyc++;
    if (rst_n && running[0] && dut.g_fu[0].u_fu.u_mc.busy_q && dut.g_fu[0].u_fu.u_mc.have_serial &&
        !dut.g_fu[0].u_fu.u_mc.can_serve) n_wait++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p [$];
    q_chr = new[N];
    d_chr = new[M];
    foreach (q_chr[i]) q_chr[i] = 1 + ($urandom % 4);
    foreach (d_chr[j]) d_chr[j] = (j % 6 < 4) ? q_chr[(j * 7) % N] : 1 + ($urandom % 4);
    sw_reference(N, M, q_chr, d_chr, best);
    in_q.push_back(word_t'(M));
    foreach (q_chr[i]) in_q.push_back(word_t'(q_chr[i]));
    foreach (d_chr[j]) in_q.push_back(word_t'(d_chr[j]));
    for (int k = 0; k < N - 1; k++) in_q.push_back('0);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    sw_program(N, p);
    foreach (p[a]) begin
      prog_we = 1'b1; prog_addr = 10'(a); prog_data = p[a];
      @(negedge clk);
    end
    prog_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (running == '0);
    repeat (40) @(posedge clk);

    check(out_q.size() == N + 1, $sformatf("%0d words out, expected %0d", out_q.size(), N + 1));
    for (int i = 0; i < N && i < out_q.size(); i++)
      check(out_q[i] == word_t'(best[i]),
            $sformatf("PE %0d best score %0d, expected %0d", i, out_q[i], best[i]));
    if (out_q.size() > N)
      check(out_q[N] == word_t'(M + N - 1), "step count");
    check(n_cyc == sw_cycles(N, M) + n_wait,
          $sformatf("%0d cycles, expected %0d + %0d waits", n_cyc, sw_cycles(N, M), n_wait));
    $display("%0d PEs x %0d cells in %0d cycles: %0.2f Mcell-updates/s per PE, %0.1f per unit at 150 MHz",
             N, M, n_cyc, real'(M) * 150.0 / real'(n_cyc), real'(N * M) * 150.0 / real'(n_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
