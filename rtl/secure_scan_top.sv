// secure_scan_top: scan chain locked by a PUF-configured non-linear shift
// register.
//
// The scan chain of a crypto core only shifts faithfully when every lock
// point on it is open, and the lock points are driven by an N-bit key held
// in the NLSR. What the right key is depends on two secrets: the connection
// style CONN_STYLE (whether each lock gate sees Q or Q-bar of its NLSR cell,
// fixed at design time) and the setting of the N CF (fuse-antifuse) links in
// the NLSR, which are burned once from the responses of on-chip delay PUFs
// and so differ from die to die. A tester shifts an N-bit scan input code
// (SIC) into the NLSR during the first N test-mode cycles after reset; the
// CF links scramble it on the way. If the NLSR then holds CONN_STYLE, the
// lock controller freezes it and the chain shifts normally; otherwise the
// wrong key keeps circulating through the NLSR and the lock gates keep
// corrupting the shifted data.
//
// Blocks: GROUPS puf_unit instances and puf_prog_ctrl program the CF units
// (group g's units take their T from PUF unit g, unit j of every group its
// enable from EN_j); nlsr holds the key; scan_lock_ctrl times the load and
// checks the key; secure_scan_chain is the locked chain; obs_port is the
// enrollment output on the last CF, removed by a fuse after enrollment.
//
// Interface: the core under test stays outside. cut_d are its flip-flops'
// next-state values, cut_q their state (the chain), cut_node the N internal
// nodes feeding the lock gates. 'sic' is a dedicated serial key input.
// Bring-up order: pulse fab_clr_n (as-fabricated fuses), reset, pulse
// puf_prog_start and wait for puf_prog_done (GS*(2*SETTLE+1) cycles),
// enroll through 'obs', blow it with obs_blow. Then in the field: reset,
// hold se = 1 and shift the N-bit SIC (first bit first) while the chain
// also shifts; from cycle N+1 on the chain shifts correctly if the SIC was
// right.
//
// Follows the document: the block structure, the grouping of CF units, the
// lock gate equations and the control sequence. This design's own choices:
// the default CONN_STYLE, the lock positions formula, the PUF delay model,
// the dedicated 'sic' pin, and the one-cycle key check described in
// scan_lock_ctrl.
module secure_scan_top
  import secure_scan_pkg::*;
#(
  parameter int unsigned N          = 64,
  parameter int unsigned GROUPS     = 8,
  parameter int unsigned SCAN_LEN   = 818,
  parameter logic [N-1:0] CONN_STYLE = N'(64'hA5C3_0F96_3C5A_E718),
  parameter arb_type_e   ARB_TYPE   = ARB_NAND,
  parameter int unsigned PUF_SEED   = 7,
  parameter int unsigned SETTLE     = 4,
  localparam int unsigned GS        = N / GROUPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fab_clr_n,
  // test access
  input  logic                se,
  input  logic                sic,
  input  logic                si,
  output logic                so,
  // core under test
  input  logic [SCAN_LEN-1:0] cut_d,
  input  logic [N-1:0]        cut_node,
  output logic [SCAN_LEN-1:0] cut_q,
  // PUF solidification
  input  logic                puf_prog_start,
  output logic                puf_prog_done,
  // enrollment port
  input  logic                obs_blow,
  output logic                obs
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CW = (GS > 1) ? $clog2(GS) : 1;

  logic [CW-1:0]     challenge;
  logic              pulse;
  logic [GS-1:0]     grp_en;
  logic [GROUPS-1:0] resp;
  logic [N-1:0]      cf_en;
  logic [N-1:0]      cf_t;
  logic [N-1:0]      nlsr_q;
  logic [N-1:0]      nlsr_q_n;
  logic [N-1:0]      key_sel;
  logic              nlsr_fb;
  logic              nlsr_shift_en;
  logic              fb_sel;

  // ---------------------------------------------------------------- PUF
  puf_prog_ctrl #(.GROUP_SIZE(GS), .SETTLE(SETTLE)) u_prog (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (puf_prog_start),
    .challenge(challenge),
    .pulse    (pulse),
    .en       (grp_en),
    .busy     (),
    .done     (puf_prog_done)
  );

  for (genvar g = 0; g < GROUPS; g++) begin : g_puf
    puf_unit #(
      .ARB_TYPE(ARB_TYPE),
      .MUX_IN  (GS),
      .SEED    (PUF_SEED * 977 + g)
    ) u_puf (
      .pulse    (pulse),
      .challenge(challenge),
      .resp     (resp[g])
    );
    for (genvar j = 0; j < GS; j++) begin : g_cf
      assign cf_t[g*GS + j]  = resp[g];
      assign cf_en[g*GS + j] = grp_en[j];
    end
  end

  // --------------------------------------------------------------- NLSR
  nlsr #(.N(N)) u_nlsr (
    .clk          (clk),
    .rst_n        (rst_n),
    .fab_clr_n    (fab_clr_n),
    .shift_en     (nlsr_shift_en),
    .fb_sel       (fb_sel),
    .sic          (sic),
    .cf_en        (cf_en),
    .cf_t         (cf_t),
    .q            (nlsr_q),
    .q_n          (nlsr_q_n),
    .cf_programmed(),
    .fb           (nlsr_fb)
  );

  // Connection style: lock i sees Q-bar where CONN_STYLE[i] = 1, else Q.
  for (genvar i = 0; i < N; i++) begin : g_conn
    assign key_sel[i] = CONN_STYLE[i] ? nlsr_q_n[i] : nlsr_q[i];
  end

  scan_lock_ctrl #(.N(N)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .se           (se),
    .key_sel      (key_sel),
    .nlsr_shift_en(nlsr_shift_en),
    .fb_sel       (fb_sel),
    .cout         (),
    .o            (),
    .checked      (),
    .count        ()
  );

  // --------------------------------------------------------- scan chain
  secure_scan_chain #(.L(SCAN_LEN), .N(N)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .se     (se),
    .si     (si),
    .func_d (cut_d),
    .node   (cut_node),
    .key_sel(key_sel),
    .q      (cut_q),
    .so     (so)
  );

  // ---------------------------------------------------- enrollment port
  obs_port u_obs (
    .clk      (clk),
    .fab_clr_n(fab_clr_n),
    .blow     (obs_blow),
    .cf_last  (nlsr_fb),
    .obs      (obs),
    .blown    ()
  );

  initial assert (N % GROUPS == 0) else $error("secure_scan_top: N must be a multiple of GROUPS");
endmodule
