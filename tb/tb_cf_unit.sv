// tb_cf_unit: self-checking test of the fuse-antifuse unit.
// Checks the as-fabricated state (C follows F), programming with T = 1
// (C follows AF) and T = 0 (C stays on F), that programming happens only
// once, and that F/AF changes reach C combinationally.
module tb_cf_unit;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fab_clr_n;
  logic en_a, t_a, f_a, af_a, c_a, p_a;
  logic en_b, t_b, f_b, af_b, c_b, p_b;

  cf_unit u_a (.clk(clk), .fab_clr_n(fab_clr_n), .en(en_a), .t(t_a), .f(f_a), .af(af_a),
               .c(c_a), .programmed(p_a));
  cf_unit u_b (.clk(clk), .fab_clr_n(fab_clr_n), .en(en_b), .t(t_b), .f(f_b), .af(af_b),
               .c(c_b), .programmed(p_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Try all F/AF combinations and compare C with the expected source.
  task automatic sweep(input bit expect_af_a, input bit expect_af_b, input string tag);
    for (int v = 0; v < 4; v++) begin
      f_a = v[0]; af_a = v[1]; f_b = v[1]; af_b = v[0];
      #1;
      check(c_a == (expect_af_a ? af_a : f_a), $sformatf("%s unit A v=%0d", tag, v));
      check(c_b == (expect_af_b ? af_b : f_b), $sformatf("%s unit B v=%0d", tag, v));
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; t_a = 0; t_b = 0; f_a = 0; af_a = 0; f_b = 0; af_b = 0;
    fab_clr_n = 1'b1;
    #1 fab_clr_n = 1'b0;
    #2 fab_clr_n = 1'b1;
    @(negedge clk);
    // As fabricated, with EN low and T toggling: no solidification.
    t_a = 1; t_b = 1;
    repeat (3) @(negedge clk);
    check(!p_a && !p_b, "virgin units report not programmed");
    sweep(0, 0, "virgin");
    // Program A with T = 1 and B with T = 0.
    t_a = 1; t_b = 0; en_a = 1; en_b = 1;
    @(negedge clk);
    en_a = 0; en_b = 0;
    check(p_a && p_b, "units report programmed");
    sweep(1, 0, "programmed");
    // Second programming attempt with opposite T must not change anything.
    t_a = 0; t_b = 1; en_a = 1; en_b = 1;
    repeat (2) @(negedge clk);
    en_a = 0; en_b = 0;
    sweep(1, 0, "after re-program attempt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
