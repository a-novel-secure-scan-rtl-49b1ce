// obs_port: enrollment output on the last CF unit of the NLSR.
//
// After the CF units are solidified nobody knows their configuration, so the
// correct scan input code cannot be worked out yet. On first power-up the
// designer shifts a known code into the NLSR and watches the last CF unit's
// output on this port, infers each CF setting from the sequence, and then
// blows the port's fuse. After that the port reads 0 forever.
//
// Interface: 'cf_last' is the last CF output; 'obs' the pad-side output.
// 'blow' sampled high on a clock edge opens the fuse (one-time, not undone
// by the system reset); fab_clr_n (asynchronous, active low) stands for the
// as-fabricated, intact fuse. 'obs' is combinational from 'cf_last'.
// The port and its removal follow the document; making the removal a
// one-time fuse bit in logic is this design's choice.
module obs_port (
  input  logic clk,
  input  logic fab_clr_n,
  input  logic blow,
  input  logic cf_last,
  output logic obs,
  output logic blown
);
  timeunit 1ns;
  timeprecision 1ps;

  logic blown_q;

  always_ff @(posedge clk or negedge fab_clr_n) begin
    if (!fab_clr_n) blown_q <= 1'b0;
    else if (blow)  blown_q <= 1'b1;
  end

  assign obs   = cf_last & ~blown_q;
  assign blown = blown_q;
endmodule
