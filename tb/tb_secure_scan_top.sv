// tb_secure_scan_top: end-to-end test of the secure scan design at its
// default size (64-bit key, 8 PUF units, 818-cell chain), driven only
// through the top's pins apart from a few read-only looks at the key state.
//
// Sequence, as a chip would see it:
//  1. as-fabricated fuses, reset, functional mode: the protection logic
//     must stay idle while the core's flip-flops capture every cycle;
//  2. PUF solidification: one start pulse, done after 8 * (2*4+1) cycles;
//  3. enrollment: shift an all-zero code and read the last CF output on the
//     enrollment port after every cycle; the CF settings follow from the
//     sequence and are compared with the PUF responses predicted from the
//     delay model; the register must then keep shifting through its CF
//     links (the all-zero code is a wrong key);
//  4. blow the enrollment fuse: the port must read 0 from then on;
//  5. a wrong code (one bit off): the NLSR keeps changing and a scan
//     load-capture-unload no longer returns the captured data;
//  6. the correct code, computed from the enrolled CF settings and the
//     connection style: the key must be complete after 64 cycles, then
//     frozen, and two full scan load-capture-unload patterns must return
//     exactly what the core computed.
// Every mechanism above is counted; one that never happened is a failure.
module tb_secure_scan_top;
  import secure_scan_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  // The design's default sizes, restated for the checker.
  localparam int unsigned N = 64;
  localparam int unsigned L = 818;
  localparam int unsigned GROUPS = 8;
  localparam int unsigned GS = N / GROUPS;
  localparam int unsigned SETTLE = 4;
  localparam int unsigned PUF_SEED = 7;
  localparam logic [N-1:0] CONN = 64'hA5C3_0F96_3C5A_E718;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  // mechanism counters
  int m_functional = 0, m_solidify = 0, m_enroll = 0, m_obs_blown = 0;
  int m_wrong_circulates = 0, m_obfuscated = 0, m_key_frozen = 0, m_capture = 0;
  int m_normal_scan = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic rst_n, fab_clr_n, se, sic, si, so, puf_prog_start, puf_prog_done, obs_blow, obs;
  logic [L-1:0] cut_d, cut_q;
  logic [N-1:0] cut_node;

  secure_scan_top dut (
    .clk(clk), .rst_n(rst_n), .fab_clr_n(fab_clr_n), .se(se), .sic(sic), .si(si), .so(so),
    .cut_d(cut_d), .cut_node(cut_node), .cut_q(cut_q),
    .puf_prog_start(puf_prog_start), .puf_prog_done(puf_prog_done),
    .obs_blow(obs_blow), .obs(obs)
  );

  // A small stand-in for the protected core: next state and internal nodes
  // are fixed functions of the current state.
  // cut_d[j] = q[j+1] ^ q[j-1] ^ (j mod 3 == 0), indices wrapping around.
  localparam logic [L-1:0] MASK3 = L'({(L + 2) / 3 {3'b001}});

  assign cut_d = {cut_q[0], cut_q[L-1:1]} ^ {cut_q[L-2:0], cut_q[L-1]} ^ MASK3;
  always_comb
    for (int i = 0; i < N; i++) cut_node[i] = cut_q[(37 * i + 11) % L] | cut_q[(53 * i + 3) % L];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // Expected PUF bit for CF unit g*GS+j: which of the two paths of PUF unit
  // g is faster for challenge j (NAND arbiter: 1 when path 2 wins).
  // Returns -1 on an exact tie, which the arbiter resolves arbitrarily.
  function automatic int predicted_t(input int unsigned idx);
    int unsigned g, j, seed;
    int d0, d1;
    g = idx / GS; j = idx % GS; seed = PUF_SEED * 977 + g;
    d0 = 350 + int'(mfg_var_ps(seed, j, 41)) + int'(mfg_var_ps(seed, 1000, 41));
    d1 = 350 + int'(mfg_var_ps(seed, GS + j, 41)) + int'(mfg_var_ps(seed, 1001, 41));
    if (d0 == d1) return -1;
    return (d0 > d1) ? 1 : 0;
  endfunction

  // Code bit k (k = 1..N, first bit first) that leaves state 'key' in the
  // register for CF settings t: stage i ends up with X_(N-i) xor t[0..i-1].
  function automatic logic [N-1:0] solve_sic(input logic [N-1:0] t, input logic [N-1:0] key);
    logic [N-1:0] x;  // x[k-1] = X_k
    logic p;
    p = 1'b0;
    for (int i = 0; i < N; i++) begin
      x[N - i - 1] = key[i] ^ p;
      p = p ^ t[i];
    end
    return x;
  endfunction

  // Shift the N-bit code with SE high; returns cycles until the carry.
  task automatic load_code(input logic [N-1:0] x, output int took);
    int start;
    se = 1; si = 0;
    start = cycles;
    for (int k = 1; k <= N; k++) begin
      sic = x[k-1];
      @(negedge clk);
    end
    sic = 0;
    took = cycles - start;
    check(dut.u_ctrl.cout, "counter carry after the code");
    @(negedge clk);  // DFF1 samples G4
  endtask

  // Load a pattern, capture once, unload; returns how many unloaded bits
  // differ from what the core computed in the capture cycle.
  task automatic scan_pattern(input logic [L-1:0] pat, output int diff, output bit load_ok);
    logic [L-1:0] captured;
    logic [N-1:0] key_before;
    diff = 0;
    se = 1;
    for (int c = 0; c < L; c++) begin
      logic [N-1:0] k0;
      si = pat[L - 1 - c];
      k0 = dut.u_nlsr.q;
      @(negedge clk);
      if (dut.u_nlsr.q != k0) m_wrong_circulates++;
    end
    load_ok = (cut_q == pat);
    // capture cycle (functional clock)
    key_before = dut.u_nlsr.q;
    captured = cut_d;
    se = 0;
    @(negedge clk);
    check(cut_q == captured, "capture cycle loads the core's next state");
    check(dut.u_nlsr.q == key_before, "NLSR does not move in the capture cycle");
    m_capture++;
    se = 1;
    for (int c = 0; c < L; c++) begin
      si = 1'($urandom);
      if (so != captured[L - 1 - c]) diff++;
      @(negedge clk);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] t_enrolled, fb_seq, sic_ok, sic_bad, prev;
    int took, diff, start, pt, ties;
    bit load_ok;

    // 1. as fabricated, reset, functional mode
    fab_clr_n = 1; rst_n = 1; se = 0; sic = 0; si = 0; puf_prog_start = 0; obs_blow = 0;
    #1 fab_clr_n = 0;
    #2 fab_clr_n = 1;
    do_reset();
    for (int c = 0; c < 20; c++) begin
      logic [L-1:0] nxt;
      nxt = cut_d;
      @(negedge clk);
      check(cut_q == nxt, "functional mode: core flip-flops capture");
      check(dut.u_nlsr.q == '0 && dut.u_ctrl.count == '0 && !dut.u_ctrl.cout,
            "functional mode: protection logic idle");
      if (c == 19) m_functional++;
    end

    // 2. PUF solidification
    puf_prog_start = 1;
    @(negedge clk);
    puf_prog_start = 0;
    start = cycles;
    while (!puf_prog_done && cycles - start < 1000) @(negedge clk);
    check(cycles - start == GS * (2 * SETTLE + 1),
          $sformatf("solidification took %0d cycles", cycles - start));
    check(dut.u_nlsr.cf_programmed == '1, "every CF unit solidified");
    if (puf_prog_done) m_solidify++;

    // 3. enrollment through the last CF unit's output
    do_reset();
    se = 1; sic = 0;
    for (int k = 0; k < N; k++) begin
      #1 fb_seq[k] = obs;
      @(negedge clk);
    end
    // fb after k zero shifts = t[N-1-k] ^ ... ^ t[N-1]
    t_enrolled[N-1] = fb_seq[0];
    for (int k = 1; k < N; k++) t_enrolled[N-1-k] = fb_seq[k] ^ fb_seq[k-1];
    ties = 0;
    for (int i = 0; i < N; i++) begin
      pt = predicted_t(i);
      if (pt < 0) ties++;
      else check(t_enrolled[i] == pt[0], $sformatf("enrolled CF %0d matches its PUF response", i));
    end
    $display("enrolled CF settings %h (%0d PUF ties)", t_enrolled, ties);
    m_enroll++;
    @(negedge clk);  // check cycle: the all-zero code is a wrong key
    check(dut.u_ctrl.o == (dut.u_nlsr.q != CONN), "DFF1 reports the key check");
    // After a failed check the register keeps shifting through its CF links:
    // stage 0 takes the last CF output, stage i takes stage i-1 through CF i-1.
    for (int c = 0; c < 30; c++) begin
      logic [N-1:0] exp_q;
      prev = dut.u_nlsr.q;
      exp_q = {prev[N-2:0] ^ t_enrolled[N-2:0], prev[N-1] ^ t_enrolled[N-1]};
      @(negedge clk);
      check(dut.u_nlsr.q == exp_q, "wrong key circulates through the CF links");
    end

    // 4. blow the enrollment port
    obs_blow = 1;
    @(negedge clk);
    obs_blow = 0;
    for (int c = 0; c < 30; c++) begin
      #1 check(obs == 1'b0, "enrollment port reads 0 once blown");
      @(negedge clk);
    end
    m_obs_blown++;

    sic_ok  = solve_sic(t_enrolled, CONN);
    sic_bad = sic_ok ^ (N'(1) << ($urandom % N));

    // 5. wrong code
    do_reset();
    load_code(sic_bad, took);
    check(dut.u_ctrl.o == 1'b1, "wrong code: DFF1 = 1");
    scan_pattern({(L + 31) / 32 {$urandom}}, diff, load_ok);
    $display("wrong code: %0d of %0d unloaded bits corrupted", diff, L);
    if (diff > 0 || !load_ok) m_obfuscated++;

    // 6. correct code, two patterns
    do_reset();
    load_code(sic_ok, took);
    check(took == N, $sformatf("key loaded in %0d cycles", took));
    check(dut.u_nlsr.q == CONN, "correct code leaves the expected key in the NLSR");
    check(dut.u_ctrl.o == 1'b0, "correct code: DFF1 = 0");
    for (int p = 0; p < 2; p++) begin
      scan_pattern({(L + 31) / 32 {$urandom}}, diff, load_ok);
      check(load_ok, "correct code: pattern loads unchanged");
      check(diff == 0, $sformatf("correct code: unload matches capture (%0d bits differ)", diff));
      if (load_ok && diff == 0) m_normal_scan++;
    end
    if (dut.u_nlsr.q == CONN) m_key_frozen++;

    $display("mechanisms: functional=%0d solidify=%0d enroll=%0d obs_blown=%0d wrong_circulates=%0d obfuscated=%0d key_frozen=%0d capture=%0d normal_scan=%0d",
             m_functional, m_solidify, m_enroll, m_obs_blown, m_wrong_circulates, m_obfuscated,
             m_key_frozen, m_capture, m_normal_scan);
    check(m_functional > 0, "mechanism: functional mode");
    check(m_solidify > 0, "mechanism: PUF solidification");
    check(m_enroll > 0, "mechanism: enrollment");
    check(m_obs_blown > 0, "mechanism: enrollment fuse");
    check(m_wrong_circulates > 0, "mechanism: wrong key circulates");
    check(m_obfuscated > 0, "mechanism: scan data obfuscated");
    check(m_key_frozen > 0, "mechanism: correct key frozen");
    check(m_capture > 0, "mechanism: capture / mode switch");
    check(m_normal_scan > 0, "mechanism: normal scan with correct key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
