// secure_scan_pkg: types and compile-time helpers shared by the secure scan
// design.
//
// - arb_type_e picks the arbiter flavour of a PUF unit: a NAND SR latch
//   (PA, racing rising edges) or a NOR SR latch (NA, racing falling edges).
// - cf_state_e is the programming state of a fuse-antifuse (CF) unit.
// - lock_pos() places the N lock points (NAND pairs A_i/B_i) along a scan
//   chain of length L. The placement in silicon is a design secret chosen at
//   random; here it is a fixed, evenly spread formula,
//   pos(i) = ((i + 1) * L) / (N + 1), which gives N distinct positions in
//   1..L-1 whenever L >= N + 1.
// - lock_index() is the inverse: which lock (if any) feeds SFF j.
// - mfg_var_ps() is a small integer hash that stands in for process
//   variation when the PUF behavioural model derives its path delays.
package secure_scan_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    ARB_NAND = 1'b0,  // PA: NAND SR latch, buffers preset to 0, rising edges race
    ARB_NOR  = 1'b1   // NA: NOR SR latch, buffers preset to 1, falling edges race
  } arb_type_e;

  typedef enum logic [1:0] {
    CF_VIRGIN   = 2'd0,  // as fabricated: fuse closed (F-C), antifuse open
    CF_FUSE     = 2'd1,  // programmed with T = 0: F-C kept, AF-C open
    CF_ANTIFUSE = 2'd2   // programmed with T = 1: AF-C closed, F-C blown
  } cf_state_e;

  function automatic int lock_pos(input int i, input int n, input int l);
    return ((i + 1) * l) / (n + 1);
  endfunction

  // Returns the lock number whose B gate drives SFF j's scan input, or -1.
  // Since pos(i) rises by at least 1 per lock, the only candidate is
  // k = i + 1 = ceil(j * (N + 1) / L).
  function automatic int lock_index(input int j, input int n, input int l);
    int k;
    k = (j * (n + 1) + l - 1) / l;
    if (k >= 1 && k <= n && lock_pos(k - 1, n, l) == j) return k - 1;
    return -1;
  endfunction

  // Deterministic 0..range-1 "process variation" for element k of a unit.
  function automatic int unsigned mfg_var_ps(input int unsigned seed,
                                             input int unsigned k,
                                             input int unsigned range);
    logic [31:0] h;
    h = seed * 32'h9E37_79B9 + k * 32'h85EB_CA6B + 32'h2545_F491;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h % range;
  endfunction
endpackage
