// hw_module: one correlation branch of the T(k) realisation module.  Branch
// A (ODD = 0) turns the permuted samples x'(v) into T(2), T(4), ..., T(N-1);
// branch B (ODD = 1) turns e'(v) into T(1), T(3), ..., T(N-2).
//
// Inside: pre_add folds the N-1 samples into L = (N-1)/2 sums, corr_da runs
// the L-point cyclic correlation, and the L outputs T'(k) (or T''(k)) are
// written at address k of an output perm_network whose table maps the
// natural index j to the k holding T(2j) (branch A) or T(2j-1) (branch B).
// Reading that network by j therefore returns the branch's outputs in
// natural order.
//
// Timing: samples stream in on in_valid/in_v/in_u, v = 1..N-1 in order.  The
// correlation starts one cycle after the last sample and takes L*M cycles;
// done pulses in the cycle in which the last output is being written, so a
// read may be issued from the next cycle on.  wbank selects the output bank
// and must be held until done.  The read port has the two-cycle latency of
// perm_network.  The branch structure is the document's; the handshakes are
// this design's.
module hw_module
  import dct_pkg::*;
#(
  parameter int N   = 7,
  parameter int G   = 3,
  parameter bit ODD = 1'b0,
  parameter int XW  = 11,             // width of x'(v) / e'(v)
  parameter int F   = 12,
  parameter int M   = XW + 1,         // width of the folded sums
  parameter int L   = (N - 1) / 2,
  parameter int TW  = M + F + $clog2(L + 1) + 1,
  parameter int IW  = $clog2(N),
  parameter int KW  = $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IW-1:0]        in_v,
  input  logic signed [XW-1:0] in_u,
  input  logic                 wbank,
  output logic                 done,
  input  logic                 rd_en,
  input  logic                 rd_bank,
  input  logic [KW-1:0]        rd_idx,
  output logic                 rd_valid,
  output logic signed [TW-1:0] rd_data
);

  localparam perm_mode_e PMODE = ODD ? PERM_POST_ODD : PERM_POST_EVEN;

  logic                 sum_valid;
  logic signed [M-1:0]  sum [L];
  logic                 c_busy, t_valid;
  logic [KW-1:0]        t_k;
  logic signed [TW-1:0] t_data;
  logic [TW-1:0]        rd_raw;

  pre_add #(.N(N), .W(XW), .SW(M)) u_pre_add (
    .clk, .rst_n,
    .in_valid, .in_v, .in_u,
    .sum_valid, .sum
  );

  corr_da #(.N(N), .G(G), .M(M), .F(F), .TW(TW)) u_corr (
    .clk, .rst_n,
    .start(sum_valid), .words(sum),
    .busy(c_busy), .t_valid, .t_k, .t_data, .done
  );

  perm_network #(.N(N), .G(G), .MODE(PMODE), .W(TW), .DEPTH(L + 1), .AW(KW)) u_post (
    .clk, .rst_n,
    .we(t_valid), .wbank, .waddr(t_k), .wdata(t_data),
    .rd_en, .rd_bank, .rd_idx, .rd_valid, .rd_data(rd_raw)
  );

  assign rd_data = signed'(rd_raw);

  // A new block must not arrive while the correlation is still running.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(sum_valid && c_busy));

endmodule
