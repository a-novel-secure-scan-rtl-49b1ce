// tb_obs_port: self-checking test of the enrollment output: it follows the
// last CF output until the fuse is blown, then reads 0 whatever the input.
module tb_obs_port;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fab_clr_n, blow, cf_last, obs, blown;

  obs_port dut (.clk(clk), .fab_clr_n(fab_clr_n), .blow(blow), .cf_last(cf_last),
                .obs(obs), .blown(blown));

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
    blow = 0; cf_last = 0;
    fab_clr_n = 1;
    #1 fab_clr_n = 0;
    #2 fab_clr_n = 1;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      cf_last = 1'($urandom);
      #1 check(obs == cf_last && !blown, "intact port follows the last CF output");
    end
    blow = 1;
    @(negedge clk);
    blow = 0;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      cf_last = 1'($urandom);
      #1 check(obs == 1'b0 && blown, "blown port reads 0");
    end
    cf_last = 1;
    #1 check(obs == 1'b0, "blown port reads 0 with input 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
