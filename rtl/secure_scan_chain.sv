// secure_scan_chain: one scan chain of L scan flip-flops with N lock points.
//
// At lock point i, placed in front of SFF p = lock_pos(i, N, L), two NAND
// gates replace the plain Q -> SI wire:
//   A_i = NAND(key_sel[i], node[i])
//   B_i = NAND(A_i, Q-bar of SFF p-1)   -> scan input of SFF p
// With key_sel[i] = 0, A_i = 1 and B_i = Q of SFF p-1: the chain shifts
// normally. With key_sel[i] = 1, B_i = node[i] | Q: whenever the core node
// is 1 the next cell receives a constant 1, so the shifted data is corrupted
// in a way that depends on the core's internal state.
//
// Interface: 'si'/'so' are the chain ends, 'se' the shift enable, func_d/q
// the functional data and state of the core's flip-flops (cell 0 is nearest
// 'si'), 'node' the N internal nodes of the core, 'key_sel' the N lines from
// the NLSR. One bit moves one cell per clock while se = 1.
//
// The gate equations follow the document. The document picks the lock
// positions and nodes at random; here the positions come from the fixed
// formula in secure_scan_pkg::lock_pos and the nodes are whatever the core
// connects to 'node'.
module secure_scan_chain
  import secure_scan_pkg::*;
#(
  parameter int unsigned L = 818,
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         se,
  input  logic         si,
  input  logic [L-1:0] func_d,
  input  logic [N-1:0] node,
  input  logic [N-1:0] key_sel,
  output logic [L-1:0] q,
  output logic         so
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int BLK  = 256;
  localparam int NBLK = (L + BLK - 1) / BLK;

  logic [L-1:0] q_n;
  logic [L-1:0] chain_in;  // scan input of each cell
  logic [N-1:0] a;
  logic [N-1:0] b;

  for (genvar i = 0; i < N; i++) begin : g_lock
    localparam int P = lock_pos(i, N, L);
    assign a[i] = ~(key_sel[i] & node[i]);
    assign b[i] = ~(a[i] & q_n[P-1]);
  end

  // Cells are generated in blocks of BLK so that no single generate loop
  // grows with the chain length.
  for (genvar hb = 0; hb < NBLK; hb++) begin : g_blk
    for (genvar lb = 0; lb < BLK; lb++) begin : g_cell
      localparam int J  = hb * BLK + lb;
      localparam int LI = lock_index(J, N, L);
      if (J < L) begin : g_on
        if (J == 0) begin : g_head
          assign chain_in[J] = si;
        end else if (LI >= 0) begin : g_locked
          assign chain_in[J] = b[LI];
        end else begin : g_plain
          assign chain_in[J] = q[J-1];
        end

        scan_ff u_sff (
          .clk  (clk),
          .rst_n(rst_n),
          .se   (se),
          .si   (chain_in[J]),
          .d    (func_d[J]),
          .q    (q[J]),
          .q_n  (q_n[J])
        );
      end
    end
  end

  assign so = q[L-1];

  initial assert (L >= N + 1) else $error("secure_scan_chain: L must be at least N + 1");
endmodule
