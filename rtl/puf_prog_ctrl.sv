// puf_prog_ctrl: sequencer that solidifies PUF responses into the CF units.
//
// The CF units are split into groups of GROUP_SIZE; all CFs of one group
// share one PUF unit on their T inputs, and the j-th CF of every group shares
// the enable EN_j. To give each CF of a group its own bit, the sequencer
// visits j = 0 .. GROUP_SIZE-1: it drives challenge j, holds the PUF pulse
// low for SETTLE cycles (buffer outputs preset), raises it for SETTLE cycles
// (race decided, responses stable) and then asserts en[j] for exactly one
// cycle, which burns the responses into the j-th CF of every group.
//
// Interface: 'start' (one cycle) begins the sequence from idle; 'busy' is
// high while it runs and 'done' stays high afterwards until reset. One full
// run takes GROUP_SIZE * (2*SETTLE + 1) cycles after 'start'.
// The grouping and the EN_j wiring follow the document; the challenge
// sequencing and the cycle counts are this design's own choice (the document
// only says that a pulse is applied and EN is raised).
module puf_prog_ctrl #(
  parameter int unsigned GROUP_SIZE = 8,
  parameter int unsigned SETTLE     = 4,
  localparam int         CW         = (GROUP_SIZE > 1) ? $clog2(GROUP_SIZE) : 1,
  localparam int         TW         = $clog2(SETTLE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic [CW-1:0]         challenge,
  output logic                  pulse,
  output logic [GROUP_SIZE-1:0] en,
  output logic                  busy,
  output logic                  done
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_PRESET = 3'd1,
    S_FIRE   = 3'd2,
    S_PROG   = 3'd3,
    S_DONE   = 3'd4
  } state_e;

  state_e        state_q;
  logic [CW-1:0] j_q;
  logic [TW-1:0] t_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      j_q     <= '0;
      t_q     <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_PRESET;
          j_q     <= '0;
          t_q     <= '0;
        end
        S_PRESET: begin
          if (t_q == TW'(SETTLE - 1)) begin
            state_q <= S_FIRE;
            t_q     <= '0;
          end else t_q <= t_q + 1'b1;
        end
        S_FIRE: begin
          if (t_q == TW'(SETTLE - 1)) begin
            state_q <= S_PROG;
            t_q     <= '0;
          end else t_q <= t_q + 1'b1;
        end
        S_PROG: begin
          if (j_q == CW'(GROUP_SIZE - 1)) state_q <= S_DONE;
          else begin
            state_q <= S_PRESET;
            j_q     <= j_q + 1'b1;
          end
        end
        S_DONE: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign challenge = j_q;
  // The pulse stays high through the programming cycle so T is stable.
  assign pulse     = (state_q == S_FIRE) || (state_q == S_PROG);
  assign busy      = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done      = (state_q == S_DONE);

  always_comb begin
    en = '0;
    if (state_q == S_PROG) en[j_q] = 1'b1;
  end
endmodule
