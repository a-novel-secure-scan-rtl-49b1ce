// scan_ff: standard mux-D scan flip-flop (SFF).
//
// A 2-to-1 multiplexer in front of a D flip-flop selects the scan input 'si'
// when 'se' = 1 (shift) and the functional data 'd' when 'se' = 0 (normal
// operation or test capture). Q and Q-bar are both brought out, since the
// lock gates use Q-bar of the previous cell.
//
// Interface: rising-edge clock, asynchronous active-low reset to 0, one
// cycle from input to q.
// The cell follows the document; the reset is this design's choice, in line
// with the document's remark that a reset clears all flip-flops of the core.
module scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic d,
  output logic q,
  output logic q_n
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= se ? si : d;
  end

  assign q_n = ~q;
endmodule
