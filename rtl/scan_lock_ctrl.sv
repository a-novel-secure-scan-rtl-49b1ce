// scan_lock_ctrl: key-load timing and key check of the secure scan design.
//
// - Modulo-N counter with carry 'cout'. Its enable is G3 = SE & ~Cout, so it
//   counts the first N test-mode cycles after reset, in which the scan input
//   code is shifted into the NLSR, and then stops with Cout = 1 until reset.
// - G4 is an OR over the key-select lines, the NLSR outputs (Q or Q-bar,
//   whichever the connection style picks) that drive the lock gates A_i.
//   G4 = 0 exactly when every lock gate is open, i.e. the key is correct.
// - DFF1 latches G4 once, in the first cycle after the key is complete
//   (clk1 = G1 has its last edge there), and then keeps it: O = 0 for a
//   correct key, O = 1 for a wrong one.
// - clk2 = G2 drives the NLSR. It ticks with the system clock in test mode
//   while the key loads; after loading it ticks only if O = 1, so a correct
//   key is frozen in the NLSR and a wrong key keeps circulating. In
//   functional mode (SE = 0) it never ticks. Here clk2 and clk1 are clock
//   enables on the one system clock.
//
// Interface: 'se' is the scan/shift enable; 'key_sel' the N lock-select
// lines; 'nlsr_shift_en' (clk2) and 'fb_sel' (= Cout, the NLSR input mux
// control) go to the NLSR. 'checked' is high once DFF1 has latched.
// Timing: with SE held high from reset, bits 1..N load in cycles 1..N,
// Cout rises after cycle N and O is valid after cycle N+1.
//
// The gates G1..G4, the counter and DFF1 follow the document. The document
// lets DFF1 sample on the same clock as the last key bit, which would check
// the key before it is complete; this design samples one cycle later and
// holds the NLSR during that cycle. That extra 'checked' flag, and clock
// enables in place of gated clocks, are this design's choices.
module scan_lock_ctrl #(
  parameter int unsigned N  = 64,
  localparam int         CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          se,
  input  logic [N-1:0]  key_sel,
  output logic          nlsr_shift_en,
  output logic          fb_sel,
  output logic          cout,
  output logic          o,
  output logic          checked,
  output logic [CW-1:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CW-1:0] cnt_q;
  logic          cout_q;
  logic          o_q;
  logic          chk_q;
  logic          cnt_en;  // G3
  logic          g4;

  assign cnt_en = se & ~cout_q;
  assign g4     = |key_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      cout_q <= 1'b0;
    end else if (cnt_en) begin
      if (cnt_q == CW'(N - 1)) begin
        cnt_q  <= '0;
        cout_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  // DFF1: one sample of G4 after the key is complete, then locked.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_q   <= 1'b0;
      chk_q <= 1'b0;
    end else if (cout_q && !chk_q) begin
      o_q   <= g4;
      chk_q <= 1'b1;
    end
  end

  // G2 (clk2): load while counting, then circulate only on a failed check.
  assign nlsr_shift_en = se & (~cout_q | (chk_q & o_q));
  assign fb_sel        = cout_q;
  assign cout          = cout_q;
  assign o             = o_q;
  assign checked       = chk_q;
  assign count         = cnt_q;

  // Once the carry is set the counter must not move again.
  property p_counter_frozen;
    @(posedge clk) cout_q |=> (cnt_q == $past(cnt_q));
  endproperty
  assert property (p_counter_frozen);
endmodule
