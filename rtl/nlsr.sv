// nlsr: non-linear shift register that holds the scan key.
//
// N D flip-flops form a chain. A CF (fuse-antifuse) unit follows every
// flip-flop: its F input is that flip-flop's Q and its AF input is Q-bar, so
// once solidified each link either copies or inverts the bit it passes on.
// CF unit i drives flip-flop i+1; the last CF unit's output 'fb' goes back
// to a 2-to-1 multiplexer in front of flip-flop 0. The multiplexer takes the
// serial scan input code 'sic' while fb_sel = 0 (key loading) and 'fb'
// while fb_sel = 1, so a register that keeps shifting after loading
// circulates its contents through the CF links.
//
// Interface: q/q_n are the flip-flop outputs (bit 0 is the first stage).
// 'shift_en' is the clock enable that stands for the gated clock clk2.
// rst_n (asynchronous, active low) clears all flip-flops to 0; fab_clr_n and
// cf_en/cf_t go to the CF units only (cf_en[i], cf_t[i] program CF i).
// One bit moves one stage per enabled clock edge.
//
// The structure follows the document. Using a clock enable on the system
// clock in place of the gated clock clk2 is this design's choice; the
// enabled edges are the same.
module nlsr #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fab_clr_n,
  input  logic         shift_en,
  input  logic         fb_sel,
  input  logic         sic,
  input  logic [N-1:0] cf_en,
  input  logic [N-1:0] cf_t,
  output logic [N-1:0] q,
  output logic [N-1:0] q_n,
  output logic [N-1:0] cf_programmed,
  output logic         fb
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N-1:0] q_r;
  logic [N-1:0] cf_out;  // cf_out[i] is the output of the CF after stage i
  logic         d0;

  assign q   = q_r;
  assign q_n = ~q_r;
  assign fb  = cf_out[N-1];
  assign d0  = fb_sel ? fb : sic;

  for (genvar i = 0; i < N; i++) begin : g_cf
    cf_unit u_cf (
      .clk       (clk),
      .fab_clr_n (fab_clr_n),
      .en        (cf_en[i]),
      .t         (cf_t[i]),
      .f         (q_r[i]),
      .af        (~q_r[i]),
      .c         (cf_out[i]),
      .programmed(cf_programmed[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_r <= '0;
    else if (shift_en) q_r <= {cf_out[N-2:0], d0};
  end
endmodule
