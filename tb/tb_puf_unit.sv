// tb_puf_unit: self-checking test of the delay PUF unit model.
// For every challenge it works out, from the unit's delay formula, which
// path is faster and so what the arbiter must decide (NAND type: response 0
// when path 1 wins; NOR type: response 1 when path 1 wins), then fires the
// pulse and compares. It also checks that a re-evaluation gives the same
// answer and that units with different seeds do not all answer alike.
module tb_puf_unit;
  import secure_scan_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned MUX_IN = 8;
  localparam int unsigned NUNITS = 4;

  int checks = 0;
  int failures = 0;
  int ties = 0;

  logic                  pulse;
  logic [2:0]            challenge;
  logic [NUNITS-1:0]     resp;
  logic [NUNITS-1:0][MUX_IN-1:0] seen;

  // Units 0,1: NAND arbiter; units 2,3: NOR arbiter.
  for (genvar u = 0; u < NUNITS; u++) begin : g_u
    puf_unit #(
      .ARB_TYPE(u < 2 ? ARB_NAND : ARB_NOR),
      .MUX_IN  (MUX_IN),
      .SEED    (11 + 5 * u)
    ) u_puf (.pulse(pulse), .challenge(challenge), .resp(resp[u]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Path delay in ps, computed from the model's documented formula.
  function automatic int delay_ps(input int unsigned seed, input int unsigned p,
                                  input int unsigned c);
    return 200 + int'(mfg_var_ps(seed, p * MUX_IN + c, 41))
         + 150 + int'(mfg_var_ps(seed, 1000 + p, 41));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d1, d2;
    bit exp_r;
    int differ;
    pulse = 0; challenge = 0;
    #10;
    for (int rep = 0; rep < 2; rep++) begin
      for (int c = 0; c < MUX_IN; c++) begin
        challenge = 3'(c);
        pulse = 0;
        #5;
        pulse = 1;
        #5;
        for (int u = 0; u < NUNITS; u++) begin
          d1 = delay_ps(11 + 5 * u, 0, c);
          d2 = delay_ps(11 + 5 * u, 1, c);
          if (d1 == d2) begin
            ties++;
          end else begin
            exp_r = (u < 2) ? (d1 > d2) : (d1 < d2);
            check(resp[u] == exp_r, $sformatf("unit %0d challenge %0d d1=%0d d2=%0d", u, c, d1, d2));
          end
          if (rep == 0) seen[u][c] = resp[u];
          else check(resp[u] == seen[u][c], $sformatf("repeatable unit %0d challenge %0d", u, c));
        end
      end
    end
    differ = 0;
    for (int u = 1; u < NUNITS; u++) if (seen[u] != seen[0]) differ++;
    check(differ > 0, "units with different seeds give different response words");
    $display("ties skipped: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
