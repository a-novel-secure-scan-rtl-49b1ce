// cf_unit: fuse-antifuse (CF) structure, a one-time programmable two-way
// connection.
//
// Two candidate inputs, F and AF, can reach the output C. As fabricated the
// fuse is closed and the antifuse open, so C follows F. The first time EN is
// sampled high the unit is solidified with the value on T: T = 1 keeps AF-C
// and breaks F-C, T = 0 keeps F-C and leaves AF-C open. Later EN pulses have
// no effect, and the system reset does not touch the programmed state.
//
// Interface: clk samples EN and T; fab_clr_n (asynchronous, active low)
// stands for the as-fabricated state of the fuse pair and is asserted once
// before programming, never in the field. C is combinational from F/AF.
// 'programmed' tells that the unit has been solidified.
//
// The selection rule (T = 1 -> AF, T = 0 -> F, EN = 0 keeps the initial
// structure) follows the document. The virgin state connecting F, the
// one-shot programming on a clock edge and the fab_clr_n input are this
// design's own choices for modelling a physical fuse in RTL.
module cf_unit
  import secure_scan_pkg::*;
(
  input  logic clk,
  input  logic fab_clr_n,
  input  logic en,
  input  logic t,
  input  logic f,
  input  logic af,
  output logic c,
  output logic programmed
);
  timeunit 1ns;
  timeprecision 1ps;

  cf_state_e state_q;

  always_ff @(posedge clk or negedge fab_clr_n) begin
    if (!fab_clr_n)
      state_q <= CF_VIRGIN;
    else if (en && state_q == CF_VIRGIN)
      state_q <= t ? CF_ANTIFUSE : CF_FUSE;
  end

  assign c          = (state_q == CF_ANTIFUSE) ? af : f;
  assign programmed = (state_q != CF_VIRGIN);
endmodule
