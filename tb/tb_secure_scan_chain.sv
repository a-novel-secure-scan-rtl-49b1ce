// tb_secure_scan_chain: self-checking test of the locked scan chain.
// L = 20 cells, N = 4 locks, which the placement formula puts in front of
// cells 4, 8, 12 and 16. (1) With every key-select line low the chain is a
// plain shift register: a random stream appears at 'so' exactly L cycles
// later, whatever the core nodes do. (2) A capture cycle (SE = 0) loads the
// functional data. (3) With random key-select lines and nodes the chain is
// compared each cycle with a reference built from the gate equations
// (a locked cell receives node | Q instead of Q), and the corruption must
// actually occur.
module tb_secure_scan_chain;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned L = 20;
  localparam int unsigned N = 4;
  localparam int LOCK_AT[N] = '{4, 8, 12, 16};

  int checks = 0;
  int failures = 0;
  int corrupted = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, se, si, so;
  logic [L-1:0] func_d, q;
  logic [N-1:0] node, key_sel;

  secure_scan_chain #(.L(L), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si), .func_d(func_d), .node(node),
    .key_sel(key_sel), .q(q), .so(so)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [L-1:0] ref_next(input logic [L-1:0] s);
    logic [L-1:0] n;
    if (!se) return func_d;
    n[0] = si;
    for (int j = 1; j < L; j++) n[j] = s[j-1];
    for (int i = 0; i < N; i++)
      if (key_sel[i] && node[i]) n[LOCK_AT[i]] = 1'b1;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] model, plain;
    logic stream[$];
    rst_n = 1; se = 1; si = 0; func_d = '0; node = '0; key_sel = '0;
    #1 rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check(q == '0, "reset clears the chain");
    // (1) unlocked shifting
    for (int c = 0; c < 3 * L; c++) begin
      si = 1'($urandom);
      node = N'($urandom);
      stream.push_back(si);
      if (c >= L) begin
        logic e;
        e = stream.pop_front();
        check(so == e, $sformatf("unlocked shift cycle %0d", c));
      end
      @(negedge clk);
    end
    // (2) capture
    se = 0;
    func_d = L'($urandom);
    @(negedge clk);
    check(q == func_d, "capture loads functional data");
    // (3) locked shifting against the reference
    model = q;
    se = 1;
    for (int c = 0; c < 200; c++) begin
      si = 1'($urandom);
      node = N'($urandom);
      key_sel = N'($urandom);
      se = ($urandom % 8) != 0;
      func_d = L'($urandom);
      #1;
      plain = {model[L-2:0], si};
      model = ref_next(model);
      if (se && model != plain) corrupted++;
      @(negedge clk);
      check(q == model && so == model[L-1], $sformatf("locked chain cycle %0d", c));
    end
    check(corrupted > 0, "lock gates corrupted shifted data at least once");
    $display("corrupting cycles: %0d", corrupted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
