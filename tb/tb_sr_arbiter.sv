// tb_sr_arbiter: self-checking test of the SR-latch arbiter model.
// For the NAND type (PA) it replays the two races of the arbiter's timing
// diagrams: Q1 rising first must leave X = 0, X-bar = 1 after both inputs
// are high, Q2 first must leave X = 1, X-bar = 0. For the NOR type (NA) the
// inputs idle high and the falling edges race: the first input to fall
// drives its own output high.
module tb_sr_arbiter;
  import secure_scan_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic pa_q1, pa_q2, pa_x, pa_xn;
  logic na_q1, na_q2, na_x, na_xn;

  sr_arbiter #(.ARB_TYPE(ARB_NAND)) u_pa (.q1(pa_q1), .q2(pa_q2), .x(pa_x), .x_n(pa_xn));
  sr_arbiter #(.ARB_TYPE(ARB_NOR))  u_na (.q1(na_q1), .q2(na_q2), .x(na_x), .x_n(na_xn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // NAND race: preset to 0, then raise the winner, later the loser.
  task automatic race_pa(input bit q1_first, input int gap);
    pa_q1 = 0; pa_q2 = 0;
    #1;
    check(pa_x && pa_xn, "PA preset: both outputs 1");
    if (q1_first) pa_q1 = 1; else pa_q2 = 1;
    #1;
    check(pa_x == !q1_first && pa_xn == q1_first, $sformatf("PA first edge q1_first=%0b", q1_first));
    #(gap);
    if (q1_first) pa_q2 = 1; else pa_q1 = 1;
    #1;
    check(pa_x == !q1_first && pa_xn == q1_first, $sformatf("PA held q1_first=%0b", q1_first));
  endtask

  // NOR race: preset to 1, then drop the winner, later the loser.
  task automatic race_na(input bit q1_first, input int gap);
    na_q1 = 1; na_q2 = 1;
    #1;
    check(!na_x && !na_xn, "NA preset: both outputs 0");
    if (q1_first) na_q1 = 0; else na_q2 = 0;
    #1;
    check(na_x == q1_first && na_xn == !q1_first, $sformatf("NA first edge q1_first=%0b", q1_first));
    #(gap);
    if (q1_first) na_q2 = 0; else na_q1 = 0;
    #1;
    check(na_x == q1_first && na_xn == !q1_first, $sformatf("NA held q1_first=%0b", q1_first));
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pa_q1 = 0; pa_q2 = 0; na_q1 = 1; na_q2 = 1;
    #5;
    for (int r = 0; r < 16; r++) begin
      race_pa(r[0], 1 + r);
      race_na(r[1], 2 + r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
