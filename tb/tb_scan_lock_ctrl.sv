// tb_scan_lock_ctrl: self-checking test of the key-load counter and key
// check. With N = 8 it checks that the counter only runs in test mode, that
// the NLSR is clocked during exactly N test-mode cycles of loading (also
// when SE drops in between), that Cout rises after the N-th of them, that
// DFF1 latches G4 one cycle later and then never changes, and that the NLSR
// clock is then stopped for a correct key (G4 = 0) and follows SE for a
// wrong one.
module tb_scan_lock_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, se, shift_en, fb_sel, cout, o, checked;
  logic [N-1:0] key_sel;
  logic [2:0] count;

  scan_lock_ctrl #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .se(se), .key_sel(key_sel), .nlsr_shift_en(shift_en),
    .fb_sel(fb_sel), .cout(cout), .o(o), .checked(checked), .count(count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // Load phase with SE gaps; returns after the N-th loading edge.
  task automatic load_key();
    int loaded;
    loaded = 0;
    while (loaded < N) begin
      se = ($urandom % 3) != 0;
      key_sel = N'($urandom);
      #1;
      check(!cout && !fb_sel && !checked, "loading: no carry yet");
      check(count == 3'(loaded), $sformatf("counter = %0d bits loaded", loaded));
      check(shift_en == se, "loading: NLSR clocked exactly in test mode");
      @(negedge clk);
      if (se) loaded++;
    end
    check(cout && fb_sel, "carry after N loading cycles");
  endtask

  task automatic check_phase(input logic [N-1:0] key_at_check, input bit wrong);
    se = 1;
    key_sel = key_at_check;
    #1;
    check(!checked && !shift_en, "check cycle: NLSR held while DFF1 samples");
    @(negedge clk);
    check(checked && o == wrong, $sformatf("DFF1 holds G4 = %0b", wrong));
    for (int c = 0; c < 20; c++) begin
      se = 1'($urandom);
      key_sel = N'($urandom);  // G4 may change, DFF1 must not
      #1;
      check(o == wrong && cout && count == 3'd0, "DFF1 and counter locked");
      check(shift_en == (wrong && se), $sformatf("after check: clk2 %s", wrong ? "follows SE" : "stopped"));
      @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; se = 0; key_sel = '0;
    #2;
    // Functional mode: nothing moves.
    do_reset();
    for (int c = 0; c < 12; c++) begin
      key_sel = N'($urandom);
      #1;
      check(!shift_en && count == 3'd0 && !cout && !o, $sformatf("functional mode: extra logic idle %b %d %b %b", shift_en, count, cout, o));
      @(negedge clk);
    end
    for (int trial = 0; trial < 4; trial++) begin
      do_reset();
      load_key();
      check_phase('0, 1'b0);            // correct key
      do_reset();
      load_key();
      check_phase(N'(1 << ($urandom % N)), 1'b1);  // one wrong bit
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
