// tb_puf_prog_ctrl: self-checking test of the PUF solidification sequencer.
// Checks, cycle by cycle against an independent expectation: for each group
// position j the pulse is low for SETTLE cycles and high for SETTLE cycles
// with challenge j, then EN_j (and only EN_j) is high for exactly one cycle
// with the pulse still high; the run ends after GROUP_SIZE*(2*SETTLE+1)
// cycles with 'done' set, and a second 'start' does nothing.
module tb_puf_prog_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned GS = 8;
  localparam int unsigned SETTLE = 3;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, pulse, busy, done;
  logic [2:0] challenge;
  logic [GS-1:0] en;

  puf_prog_ctrl #(.GROUP_SIZE(GS), .SETTLE(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .challenge(challenge),
    .pulse(pulse), .en(en), .busy(busy), .done(done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 0; start = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check(!busy && !done && en == '0 && !pulse, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    for (int j = 0; j < GS; j++) begin
      for (int k = 0; k < SETTLE; k++) begin
        check(busy && !pulse && en == '0 && challenge == 3'(j), $sformatf("preset j=%0d k=%0d", j, k));
        @(negedge clk); cyc++;
      end
      for (int k = 0; k < SETTLE; k++) begin
        check(busy && pulse && en == '0 && challenge == 3'(j), $sformatf("fire j=%0d k=%0d", j, k));
        @(negedge clk); cyc++;
      end
      check(busy && pulse && en == GS'(1 << j) && challenge == 3'(j), $sformatf("program EN_%0d", j + 1));
      @(negedge clk); cyc++;
    end
    check(done && !busy && en == '0, "done after full sequence");
    check(cyc == GS * (2 * SETTLE + 1), $sformatf("sequence length %0d cycles", cyc));
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (4) begin
      check(done && en == '0, "done is final");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
