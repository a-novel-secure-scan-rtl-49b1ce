// tb_nlsr: self-checking test of the non-linear shift register.
// Part 1 replays the worked example: N = 8, every CF unit passes Q-bar,
// code X1..X8 = 0,0,1,1,0,0,0,1 shifted in first bit first; the state after
// each cycle must match the table of states (stage i holds X or X-bar as
// listed) and after 8 cycles the register must hold the expected key
// 1,1,0,1,1,0,0,1 (stage 1 first). Part 2 programs random CF settings and
// compares with a reference model over random codes, feedback circulation
// (fb_sel = 1) and hold cycles (shift_en = 0).
module tb_nlsr;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, fab_clr_n, shift_en, fb_sel, sic, fb;
  logic [N-1:0] cf_en, cf_t, q, q_n, cf_prog;

  nlsr #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .fab_clr_n(fab_clr_n), .shift_en(shift_en),
    .fb_sel(fb_sel), .sic(sic), .cf_en(cf_en), .cf_t(cf_t), .q(q), .q_n(q_n),
    .cf_programmed(cf_prog), .fb(fb)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Reference: next state of the register for CF settings t.
  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s, input logic [N-1:0] t,
                                            input logic in0);
    logic [N-1:0] n;
    n[0] = in0;
    for (int i = 1; i < N; i++) n[i] = s[i-1] ^ t[i-1];
    return n;
  endfunction

  task automatic program_cf(input logic [N-1:0] t);
    fab_clr_n = 0;
    #1 fab_clr_n = 1;
    @(negedge clk);
    cf_t = t; cf_en = '1;
    @(negedge clk);
    cf_en = '0;
    check(cf_prog == '1, "all CF units programmed");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] x;       // x[k-1] = X_k
    logic [N-1:0] t;
    logic [N-1:0] model;
    logic in0;
    rst_n = 0; fab_clr_n = 1; shift_en = 0; fb_sel = 0; sic = 0; cf_en = '0; cf_t = '0;
    #2;
    // ---------------- Part 1: worked example, all links inverting
    program_cf('1);
    rst_n = 0;
    #1 rst_n = 1;
    check(q == '0, "reset clears the register");
    x = 8'b1000_1100;  // X1..X8 = 0,0,1,1,0,0,0,1 (X1 in bit 0)
    shift_en = 1;
    for (int k = 1; k <= N; k++) begin
      sic = x[k-1];
      @(negedge clk);
      // Table row k: stage 1 holds X_k, stage i holds X_(k-i+1) inverted
      // when i is even, plain when odd; stages beyond k all hold k mod 2.
      for (int i = 1; i <= N; i++) begin
        logic e;
        if (i <= k) e = x[k-i] ^ ((i % 2) == 0);
        else        e = (k % 2) == 1;
        check(q[i-1] == e, $sformatf("table row %0d stage %0d", k, i));
      end
    end
    check(q == 8'b1001_1011, $sformatf("expected key 11011001 (stage 1 first), got %b", q));
    // Hold: shift_en low keeps the key.
    shift_en = 0;
    repeat (3) @(negedge clk);
    check(q == 8'b1001_1011, "key held with shift disabled");

    // ---------------- Part 2: random links, reference model
    for (int trial = 0; trial < 6; trial++) begin
      t = N'($urandom);
      program_cf(t);
      rst_n = 0;
      #1 rst_n = 1;
      model = '0;
      for (int cyc = 0; cyc < 40; cyc++) begin
        fb_sel   = (cyc >= N);
        shift_en = ($urandom % 4) != 0;
        sic      = 1'($urandom);
        check(fb == (model[N-1] ^ t[N-1]), $sformatf("fb trial %0d cyc %0d", trial, cyc));
        in0 = fb_sel ? (model[N-1] ^ t[N-1]) : sic;
        @(negedge clk);
        if (shift_en) model = ref_next(model, t, in0);
        check(q == model && q_n == ~model, $sformatf("state trial %0d cyc %0d", trial, cyc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
