// tb_scan_ff: self-checking test of the mux-D scan flip-flop: random SE,
// SI and D for 200 cycles against a one-line reference, plus reset.
module tb_scan_ff;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, se, si, d, q, q_n;

  scan_ff dut (.clk(clk), .rst_n(rst_n), .se(se), .si(si), .d(d), .q(q), .q_n(q_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    se = 1; si = 1; d = 1;
    rst_n = 0;
    #2;
    check(q == 1'b0 && q_n == 1'b1, "reset to 0");
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      se = 1'($urandom); si = 1'($urandom); d = 1'($urandom);
      exp_q = se ? si : d;
      @(negedge clk);
      check(q == exp_q && q_n == !exp_q, $sformatf("cycle %0d se=%0b", c, se));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
