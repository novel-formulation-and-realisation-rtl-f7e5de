// tk_realisation: stage 2, the T(k) realisation module.  It computes
// T(k) = sum_{i=1..N-1} x(i) cos(pi*i*k/N) for k = 1..N-1 as two
// (N-1)/2-point cyclic correlations running side by side.
//
// Structure.  The input perm_network receives x(1)..x(N-1) in natural
// address order from stage 1 and, read by v = 1..N-1, delivers
// x'(v) = x(<G^v>_N).  Each x'(v) goes straight to branch A (hw_module,
// even outputs) and, through sign_mult as e'(v) = (-1)^<G^v>_N x'(v), to
// branch B (odd outputs).  The two branches are identical apart from their
// output tables.
//
// Interface and timing.  The write port (x_we, x_wbank, x_waddr, x_wdata)
// is stage 1's.  A start pulse processes the block in input bank pre_bank
// and writes the results into output bank post_bank (both held until done).
// The sequencer issues the N-1 reads on consecutive cycles; the samples
// arrive two cycles later, the correlations start one cycle after the last
// and run L*M cycles.  done pulses N+L*M+3 cycles after start (L = (N-1)/2,
// M = XW+1).  The read port returns T(rd_m), rd_m = 1..N-1, in signed fixed
// point with F fraction bits, two cycles after the request; even rd_m reads
// branch A, odd rd_m branch B.  The block structure is the document's; the
// sequencing is this design's.
module tk_realisation
  import dct_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int XW = 11,
  parameter int F  = 12,
  parameter int M  = XW + 1,
  parameter int L  = (N - 1) / 2,
  parameter int TW = M + F + $clog2(L + 1) + 1,
  parameter int IW = $clog2(N),
  parameter int KW = $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input buffer write port (stage 1)
  input  logic                 x_we,
  input  logic                 x_wbank,
  input  logic [IW-1:0]        x_waddr,
  input  logic signed [XW-1:0] x_wdata,
  // control
  input  logic                 start,
  input  logic                 pre_bank,
  input  logic                 post_bank,
  output logic                 done,
  // result read port (stage 3)
  input  logic                 rd_en,
  input  logic                 rd_bank,
  input  logic [IW-1:0]        rd_m,
  output logic                 rd_valid,
  output logic signed [TW-1:0] rd_data
);

  // ---- sequencer: read x'(1)..x'(N-1) ----
  logic          issuing;
  logic [IW-1:0] v_q, v_d1, v_d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      v_q     <= IW'(1);
      v_d1    <= '0;
      v_d2    <= '0;
    end else begin
      v_d1 <= v_q;
      v_d2 <= v_d1;
      if (start) begin
        issuing <= 1'b1;
        v_q     <= IW'(1);
      end else if (issuing) begin
        if (v_q == IW'(N - 1)) issuing <= 1'b0;
        else                   v_q <= v_q + 1'b1;
      end
    end
  end

  logic                 xp_valid;
  logic [XW-1:0]        xp_raw;
  logic signed [XW-1:0] xp, ep;

  perm_network #(.N(N), .G(G), .MODE(PERM_PRE), .W(XW), .DEPTH(N), .AW(IW)) u_pre_perm (
    .clk, .rst_n,
    .we(x_we), .wbank(x_wbank), .waddr(x_waddr), .wdata(x_wdata),
    .rd_en(issuing), .rd_bank(pre_bank), .rd_idx(v_q),
    .rd_valid(xp_valid), .rd_data(xp_raw)
  );

  assign xp = signed'(xp_raw);

  sign_mult #(.N(N), .G(G), .W(XW), .IW(IW)) u_sign (
    .v(v_d2), .x_data(xp), .e_data(ep)
  );

  // ---- the two branches ----
  logic                 done_a, done_b;
  logic                 rv_a, rv_b;
  logic signed [TW-1:0] rd_a, rd_b;
  logic                 rd_odd, odd_d1, odd_d2;
  logic [KW-1:0]        rd_j;

  assign rd_odd = rd_m[0];
  assign rd_j   = KW'((rd_m + 1'b1) >> 1);   // T(2j) or T(2j-1)

  hw_module #(.N(N), .G(G), .ODD(1'b0), .XW(XW), .F(F), .M(M), .TW(TW)) u_hw_a (
    .clk, .rst_n,
    .in_valid(xp_valid), .in_v(v_d2), .in_u(xp),
    .wbank(post_bank), .done(done_a),
    .rd_en(rd_en && !rd_odd), .rd_bank, .rd_idx(rd_j),
    .rd_valid(rv_a), .rd_data(rd_a)
  );

  hw_module #(.N(N), .G(G), .ODD(1'b1), .XW(XW), .F(F), .M(M), .TW(TW)) u_hw_b (
    .clk, .rst_n,
    .in_valid(xp_valid), .in_v(v_d2), .in_u(ep),
    .wbank(post_bank), .done(done_b),
    .rd_en(rd_en && rd_odd), .rd_bank, .rd_idx(rd_j),
    .rd_valid(rv_b), .rd_data(rd_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_d1 <= 1'b0;
      odd_d2 <= 1'b0;
    end else begin
      odd_d1 <= rd_odd;
      odd_d2 <= odd_d1;
    end
  end

  assign rd_valid = rv_a | rv_b;
  assign rd_data  = odd_d2 ? rd_b : rd_a;
  // both branches run in lock step; done_b carries the same cycle
  assign done     = done_a;

  // The two branches always finish together.
  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) done_a == done_b);

endmodule
