// svp_sw_pkg: SVP programs and reference models shared by the system-level
// testbenches.
//
// sw_program(n): Smith-Waterman local alignment on an n-PE unit (linear gap
//   penalty). Stream In carries M, the n query characters, the M database
//   characters and n-1 zeros; Stream Out receives each PE's best row score
//   and then the number of systolic steps (M + n - 1). 20 cycles per step.
// max_program(n): reads n scores and one trailing word, reduces the scores to
//   their maximum by shifting through the shared register files, and writes
//   the maximum and the trailing word to Stream Out.
// sw_reference(): the score matrix computed directly.
package svp_sw_pkg;
  import svp_pkg::*;

  localparam int MATCH = 2, MISMATCH = -1, GAP = 1;
  localparam int LMBASE = 16;
  localparam int STEP_CYCLES = 20;

  function automatic void sw_program(int n, ref logic [31:0] p [$]);
    p.delete();
    p.push_back(ic_enc(IC_LI,   1, 0, 16'(GAP)));              // 0
    p.push_back(ic_enc(IC_LI,   2, 0, 16'(MISMATCH)));         // 1
    p.push_back(ic_enc(IC_LI,   3, 0, 16'(MATCH - MISMATCH))); // 2
    p.push_back(ic_enc(IC_LI,   4, 0, 16'(n)));                // 3
    p.push_back(ic_enc(IC_LI,   6, 0, 16'(LMBASE)));           // 4
    p.push_back(ic_enc(IC_LD,   5, 0, STREAM_ADDR));           // 5  icr5 = M
    p.push_back(pe_rri(OP_LD,   6, 2, 12'hFFF));               // 6  query char
    p.push_back(ic_enc(IC_LOOP, 0, 4, 16'd8));                 // 7
    p.push_back(pe_rri(OP_ADD,  10, 2, 12'd1));                // 8  index
    p.push_back(ic_enc(IC_ADDI, 5, 5, 16'(n - 1)));            // 9
    p.push_back(ic_enc(IC_LOOP, 0, 5, 16'd29));                // 10 per step
    p.push_back(pe_rri(OP_BMSSET, C_EQ, 2, 12'd0));            // 11
    p.push_back(pe_rri(OP_LD,   0, 2, 12'hFFF));               // 12
    p.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                    // 13
    p.push_back(pe_rrr(OP_MAX,  3, 1, 5));                     // 14
    p.push_back(pe_rrc(OP_SUB,  3, 3, 1));                     // 15
    p.push_back(pe_rrc(OP_ADD,  4, 4, 2));                     // 16
    p.push_back(pe_rrr(OP_BMSSET, C_EQ, 0, 6));                // 17
    p.push_back(pe_rrc(OP_ADD,  4, 4, 3));                     // 18
    p.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                    // 19
    p.push_back(pe_rrr(OP_MAX,  3, 3, 4));                     // 20
    p.push_back(pe_rri(OP_MAX,  5, 3, 12'd0));                 // 21
    p.push_back(pe_rrr(OP_MOV,  4, 0, 1));                     // 22
    p.push_back(pe_rri(OP_BMSSET, C_NE, 0, 12'd0));            // 23
    p.push_back(pe_rrr(OP_BMSSET, C_GT, 5, 7));                // 24
    p.push_back(pe_rrr(OP_MOV,  7, 0, 5));                     // 25
    p.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                    // 26
    p.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                    // 27
    p.push_back(pe_rrr(OP_MOV,  8, 0, 0));                     // 28
    p.push_back(pe_rrr(OP_MOV,  9, 0, 5));                     // 29
    p.push_back(pe_rrc(OP_ST,   7, 2, 6));                     // 30
    p.push_back(pe_rrr(OP_XOR,  3, 3, 3));                     // 31
    p.push_back(pe_rrc(OP_LD,   3, 2, 6));                     // 32
    p.push_back(pe_rrr(OP_XOR,  4, 4, 4));                     // 33
    p.push_back(pe_rri(OP_ST,   3, 4, 12'hFFF));               // 34
    p.push_back(ic_enc(IC_JMP,  0, 0, 16'd37));                // 35
    p.push_back(ic_enc(IC_LI,   5, 0, 16'hDEAD));              // 36 skipped
    p.push_back(ic_enc(IC_ST,   5, 0, STREAM_ADDR));           // 37
    p.push_back(ic_enc(IC_HALT, 0, 0, 16'd0));                 // 38
  endfunction

  // cycles of sw_program when the streams never run empty or full
  function automatic int sw_cycles(int n, int m);
    return 1 + 5 + 2 + (1 + n) + 2 + n + 1 + 2 + STEP_CYCLES * (m + n - 1)
           + (1 + n) + 1 + 2 + 1 + (1 + n) + 2 + 2 + 1;
  endfunction

  function automatic void max_program(int n, ref logic [31:0] p [$]);
    p.delete();
    p.push_back(ic_enc(IC_LI,   8, 0, 16'd2000));              // 0  idle for 2000 cycles first,
    p.push_back(ic_enc(IC_LOOP, 0, 8, 16'd2));                 // 1  so that the upstream unit
    p.push_back(pe_rrr(OP_NOP,  0, 0, 0));                     // 2  meets a full Stream Out
    p.push_back(ic_enc(IC_LI,   4, 0, 16'(n)));                // 3
    p.push_back(ic_enc(IC_LI,   7, 0, 16'(n - 1)));            // 4
    p.push_back(pe_rri(OP_LD,   0, 2, 12'hFFF));               // 5  r0 = score
    p.push_back(ic_enc(IC_LD,   1, 0, STREAM_ADDR));           // 6  trailing word
    p.push_back(ic_enc(IC_LOOP, 0, 7, 16'd8));                 // 7  n-1 times
    p.push_back(pe_rrr(OP_MAX,  0, 0, 8));                     // 8    r0 = max(r0, right r0)
    p.push_back(ic_enc(IC_LOOP, 0, 4, 16'd10));                // 9  n times
    p.push_back(pe_rri(OP_ADD,  10, 2, 12'd1));                // 10   index
    p.push_back(pe_rri(OP_BMSSET, C_EQ, 2, 12'd0));            // 11 PE 0 only
    p.push_back(pe_rri(OP_ST,   0, 3, 12'hFFF));               // 12 (r3 is 0)
    p.push_back(pe_rrr(OP_BMEND, 0, 0, 0));                    // 13
    p.push_back(ic_enc(IC_ST,   1, 0, STREAM_ADDR));           // 14
    p.push_back(ic_enc(IC_HALT, 0, 0, 16'd0));                 // 15
  endfunction

  function automatic void sw_reference(int n, int m, const ref int q [], const ref int d [],
                                       ref int best []);
    int h [][];
    h = new[n + 1];
    foreach (h[i]) begin
      h[i] = new[m + 1];
      foreach (h[i][j]) h[i][j] = 0;
    end
    best = new[n];
    for (int i = 1; i <= n; i++) begin
      best[i-1] = 0;
      for (int j = 1; j <= m; j++) begin
        int v;
        v = h[i-1][j-1] + ((q[i-1] == d[j-1]) ? MATCH : MISMATCH);
        if (h[i-1][j] - GAP > v) v = h[i-1][j] - GAP;
        if (h[i][j-1] - GAP > v) v = h[i][j-1] - GAP;
        if (v < 0) v = 0;
        h[i][j] = v;
        if (v > best[i-1]) best[i-1] = v;
      end
    end
  endfunction

endpackage
