// tb_secure_scan_workloads: runs the full test flow (secure_scan_flow) on
// the design sized for the five benchmark cores of the evaluation, each with
// its own scan-chain length (number of scan flip-flops) and with both key
// lengths of the evaluation, 64 and 128 bits. This one takes the three
// smaller cores: Wb-Conmax 818 / N = 128, aeMB 3458 / N = 64 and
// Aes-Ite 1048 / N = 128; tb_secure_scan_workloads_large takes the two
// larger ones. (Wb-Conmax with N = 64 is the design's default size, run by
// tb_secure_scan_top.) The Wb-Conmax instance uses the NOR-type (NA)
// arbiter in its PUF units, the others the NAND type. The cores themselves
// are stand-ins; only the chain lengths come from the evaluation.
module tb_secure_scan_workloads;
  import secure_scan_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NW = 3;
  localparam logic [127:0] CONN128 = 128'h3C96_E1A5_0FF0_5AA5_A5C3_0F96_3C5A_E718;

  int checks[NW];
  int failures[NW];
  bit done[NW];

  secure_scan_flow #(.N(128), .L(818),   .CONN(CONN128), .PUF_SEED(21), .ARB(ARB_NOR)) u_wb_conmax
    (.checks_o(checks[0]), .failures_o(failures[0]), .done_o(done[0]));
  secure_scan_flow #(.N(64),  .L(3458),  .CONN(CONN128[63:0]), .PUF_SEED(22)) u_aemb
    (.checks_o(checks[1]), .failures_o(failures[1]), .done_o(done[1]));
  secure_scan_flow #(.N(128), .L(1048),  .CONN(CONN128), .PUF_SEED(23)) u_aes_ite
    (.checks_o(checks[2]), .failures_o(failures[2]), .done_o(done[2]));

  initial begin
    int tc, tf;
    bit all_done;
    all_done = 0;
    // watchdog: 5 ms of simulated time, several times the longest run
    for (int w = 0; w < 500000 && !all_done; w++) begin
      #10;
      all_done = 1;
      for (int k = 0; k < NW; k++) if (!done[k]) all_done = 0;
    end
    tc = 0; tf = 0;
    for (int k = 0; k < NW; k++) begin
      tc += checks[k];
      tf += failures[k];
    end
    if (!all_done) begin
      tf++;
      $display("FAIL: watchdog");
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
