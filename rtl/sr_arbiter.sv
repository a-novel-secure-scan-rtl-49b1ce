// sr_arbiter: behavioural model of the balanced SR-latch arbiter of a delay
// PUF unit. It is a cross-coupled pair of gates, not clocked logic, so it is
// written as a behavioural model.
//
// NAND type (PA): X = NAND(Q1, Xb), Xb = NAND(Q2, X). With both inputs at 0
// both outputs are 1. The input that rises first pulls its own output low
// (Q1 first: X = 0, Xb = 1; Q2 first: X = 1, Xb = 0) and the latch holds
// that decision after the other input also rises.
// NOR type (NA): X = NOR(Q1, Xb), Xb = NOR(Q2, X). With both inputs at 1
// both outputs are 0; the input that falls first drives its own output high
// (Q1 first: X = 1, Xb = 0) and the decision is held.
// If both inputs change in the same instant the real latch goes metastable;
// the model resolves such a tie to TIE_X.
//
// Interface: q1, q2 are the ends of the two delay paths; x, x_n the latch
// outputs. No clock; outputs settle in zero time.
// The NAND latch behaviour follows the document's timing description; the
// NOR variant is the dual and the tie rule is this model's own.
module sr_arbiter
  import secure_scan_pkg::*;
#(
  parameter arb_type_e ARB_TYPE = ARB_NAND,
  parameter bit        TIE_X    = 1'b0
) (
  input  logic q1,
  input  logic q2,
  output logic x,
  output logic x_n
);
  timeunit 1ns;
  timeprecision 1ps;

  // Latch state, updated whenever an input changes.
  logic x_q;
  logic xn_q;

  initial begin
    x_q  = (ARB_TYPE == ARB_NAND);
    xn_q = (ARB_TYPE == ARB_NAND);
  end

  always @(q1 or q2) begin
    if (ARB_TYPE == ARB_NAND) begin
      unique case ({q1, q2})
        2'b00: begin x_q = 1'b1; xn_q = 1'b1; end
        2'b10: begin x_q = 1'b0; xn_q = 1'b1; end
        2'b01: begin x_q = 1'b1; xn_q = 1'b0; end
        2'b11: if (x_q && xn_q) begin  // simultaneous arrival
                 x_q = TIE_X; xn_q = !TIE_X;
               end
      endcase
    end else begin
      unique case ({q1, q2})
        2'b11: begin x_q = 1'b0; xn_q = 1'b0; end
        2'b01: begin x_q = 1'b1; xn_q = 1'b0; end
        2'b10: begin x_q = 1'b0; xn_q = 1'b1; end
        2'b00: if (!x_q && !xn_q) begin  // simultaneous arrival
                 x_q = TIE_X; xn_q = !TIE_X;
               end
      endcase
    end
  end

  assign x   = x_q;
  assign x_n = xn_q;
endmodule
