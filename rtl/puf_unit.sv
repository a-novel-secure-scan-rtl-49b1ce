// puf_unit: behavioural model of one delay PUF unit (two multiplexers, two
// buffers and an SR-latch arbiter). Its value comes from analog delay
// differences, so it cannot be synthesizable logic.
//
// A pulse is distributed to two multiplexers; each multiplexer output goes
// through a buffer to one input of the arbiter. Because no two paths are
// identical after manufacturing, one edge arrives first and the arbiter
// latches which one. The challenge selects which multiplexer input (each with
// its own delay) carries the pulse, so one unit answers several challenges.
//
// Process variation is modelled by deriving every multiplexer-input and
// buffer delay from SEED: delay = base + mfg_var_ps(SEED, element, VAR_PS+1)
// picoseconds. Different SEEDs stand for different dies or units.
//
// Interface: 'pulse' low presets both buffer outputs (to 0 for the NAND
// arbiter, to 1 for the NOR arbiter, which races falling edges); raising it
// launches the race. 'challenge' must be stable from before the rising edge
// of 'pulse' until 'resp' is read. 'resp' (arbiter output X) is valid about
// MUX_BASE_PS + BUF_BASE_PS + 2*VAR_PS picoseconds after 'pulse' rises.
//
// The structure (mux + buffer per path, PA/NA arbiter, preset then launch)
// follows the document. The number of multiplexer inputs, the delay values
// and the use of X as the response bit are this model's own choices.
module puf_unit
  import secure_scan_pkg::*;
#(
  parameter arb_type_e   ARB_TYPE    = ARB_NAND,
  parameter int unsigned MUX_IN      = 8,
  parameter int unsigned SEED        = 1,
  parameter int unsigned MUX_BASE_PS = 200,
  parameter int unsigned BUF_BASE_PS = 150,
  parameter int unsigned VAR_PS      = 40,
  localparam int         CW          = (MUX_IN > 1) ? $clog2(MUX_IN) : 1
) (
  input  logic          pulse,
  input  logic [CW-1:0] challenge,
  output logic          resp
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic IDLE = (ARB_TYPE == ARB_NOR);

  // Path p's delay in ns for challenge c.
  function automatic realtime path_delay(input int unsigned p, input int unsigned c);
    int unsigned ps;
    ps = MUX_BASE_PS + mfg_var_ps(SEED, p * MUX_IN + c, VAR_PS + 1)
       + BUF_BASE_PS + mfg_var_ps(SEED, 1000 + p, VAR_PS + 1);
    return realtime'(ps) / 1000.0;
  endfunction

  logic launch;
  logic q1;
  logic q2;
  logic x_n;  // complementary arbiter output, not used as a response

  initial begin
    q1 = IDLE;
    q2 = IDLE;
  end

  assign launch = (ARB_TYPE == ARB_NAND) ? pulse : !pulse;

  always @(launch) begin
    q1 <= #(path_delay(0, 32'(challenge))) launch;
    q2 <= #(path_delay(1, 32'(challenge))) launch;
  end

  sr_arbiter #(.ARB_TYPE(ARB_TYPE)) u_arb (
    .q1 (q1),
    .q2 (q2),
    .x  (resp),
    .x_n(x_n)
  );
endmodule
