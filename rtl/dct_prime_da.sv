// dct_prime_da: pipelined N-point discrete cosine transform for an odd prime
// N, built from two (N-1)/2-point cyclic correlations evaluated by
// distributed arithmetic (ROM lookups, adders and registers; the only
// multiplications are the final N-1 scalings, done bit-serially).
//
//   Y(k) = sum_{i=0..N-1} y(i) cos(pi*(2i+1)*k/(2N))
//        = (2*T(k) + x(0)) * cos(k*pi/(2N)),   k >= 1,
//   x(N-1) = y(N-1),  x(i) = y(i) - x(i+1),
//   T(k)   = sum_{i=1..N-1} x(i) cos(pi*i*k/N),   Y(0) = sum y(i).
//
// Pipeline (three stages, each with its own controller):
//   stage 1  stage1_xgen     x(i), x(0) and Y(0) from the input samples
//   stage 2  tk_realisation  T(1..N-1): input permutation, two DA
//                            correlation branches, output permutations
//   stage 3  stage3_scale    Y(k) = (2T(k)+x(0)) cos(k*pi/2N)
// The buffers between the stages are the two-bank RAMs of the input and
// output permutation networks.  Each buffer holds up to two blocks; a
// full/empty flag per bank and a write and a read bank pointer per buffer
// let the three stages work on three successive blocks at once.  x(0) and
// Y(0) travel beside the data in per-bank registers.
//
// Interface.  Samples of a block enter as y(N-1), y(N-2), ..., y(0), one per
// cycle in which in_valid and in_ready are both high; in_ready falls while
// both banks of the input buffer are occupied (input stall).  Results leave
// as Y(0), Y(1), ..., Y(N-1) with out_valid pulses, out_k the index and
// out_y in signed fixed point with CF fraction bits; out_last marks Y(N-1).
// There is no output back-pressure.  Samples are W_IN-bit two's complement.
// The stat_* outputs expose the buffer flags and stage activity.
//
// Timing (defaults N = 7, W_IN = 8): stage 1 takes N cycles per block,
// stage 2 N+4+L*M cycles (L = (N-1)/2, M = W_IN+clog2(N)+1), stage 3
// 2+(N-1)*(ZW+4) cycles (ZW = M+clog2(L+1)+3); the slowest stage sets the block rate.
//
// The three-stage split, the stage contents and the table-lookup
// permutations follow the document's block diagrams.  The word widths,
// fraction widths, sample order, bank-flag handshake and output format are
// this design's own choices.
module dct_prime_da
  import dct_pkg::*;
#(
  parameter int N    = 7,
  parameter int G    = 3,
  parameter int W_IN = 8,
  parameter int F    = 12,                         // DA ROM fraction bits
  parameter int CF   = 12,                         // cosine table fraction bits
  parameter int XW   = W_IN + $clog2(N),           // x(i), Y(0)
  parameter int M    = XW + 1,                     // DA word length
  parameter int L    = (N - 1) / 2,
  parameter int TW   = M + F + $clog2(L + 1) + 1,  // T(k)
  parameter int ZW   = TW - F + 2,                 // 2T(k)+x(0)
  parameter int YW   = ZW + CF + 1,                // Y(k)
  parameter int IW   = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [W_IN-1:0] in_y,
  output logic                   out_valid,
  output logic [IW-1:0]          out_k,
  output logic signed [YW-1:0]   out_y,
  output logic                   out_last,
  // pipeline status, for observation only
  output logic [1:0]             stat_pre_full,   // input buffer banks holding a block
  output logic [1:0]             stat_post_full,  // output buffer banks holding a block
  output logic [2:0]             stat_busy        // stage 3..1 working on a block
);

  if (!is_prim_root(G, N)) begin : g_bad_root
    $error("G must be a primitive root of the odd prime N");
  end

  // ---------------- stage 1 ----------------
  logic                 s1_fire;
  logic                 x_valid, blk_done;
  logic [IW-1:0]        x_idx;
  logic signed [XW-1:0] x_data, blk_x0, blk_y0;

  logic [1:0]           pre_full;
  logic                 s1_bank, s2_rbank;
  logic signed [XW-1:0] pre_x0 [2], pre_y0 [2];

  assign in_ready = !pre_full[s1_bank];
  assign s1_fire  = in_valid && in_ready;

  stage1_xgen #(.N(N), .W_IN(W_IN), .XW(XW), .IW(IW)) u_stage1 (
    .clk, .rst_n,
    .in_valid(s1_fire), .in_y,
    .x_valid, .x_idx, .x_data,
    .blk_done, .blk_x0, .blk_y0
  );

  // ---------------- stage 2 ----------------
  logic                 s2_busy, s2_start, s2_done;
  logic [1:0]           post_full;
  logic                 s2_wbank, s3_bank;
  logic signed [XW-1:0] post_x0 [2], post_y0 [2];
  logic                 t_rd_en, t_rd_valid;
  logic [IW-1:0]        t_rd_m;
  logic signed [TW-1:0] t_rd_data;

  assign s2_start = !s2_busy && pre_full[s2_rbank] && !post_full[s2_wbank];

  tk_realisation #(.N(N), .G(G), .XW(XW), .F(F), .M(M), .TW(TW), .IW(IW)) u_stage2 (
    .clk, .rst_n,
    .x_we(x_valid && x_idx != '0), .x_wbank(s1_bank), .x_waddr(x_idx), .x_wdata(x_data),
    .start(s2_start), .pre_bank(s2_rbank), .post_bank(s2_wbank), .done(s2_done),
    .rd_en(t_rd_en), .rd_bank(s3_bank), .rd_m(t_rd_m),
    .rd_valid(t_rd_valid), .rd_data(t_rd_data)
  );

  // ---------------- stage 3 ----------------
  logic s3_busy, s3_start, s3_done;

  assign s3_start = !s3_busy && post_full[s3_bank];

  stage3_scale #(.N(N), .XW(XW), .TW(TW), .F(F), .CF(CF), .ZW(ZW), .YW(YW), .IW(IW)) u_stage3 (
    .clk, .rst_n,
    .start(s3_start), .x0(post_x0[s3_bank]), .y0(post_y0[s3_bank]),
    .busy(s3_busy), .done(s3_done),
    .rd_en(t_rd_en), .rd_m(t_rd_m), .rd_valid(t_rd_valid), .rd_data(t_rd_data),
    .out_valid, .out_k, .out_y, .out_last
  );

  // ---------------- buffer control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_full  <= '0;
      post_full <= '0;
      s1_bank   <= 1'b0;
      s2_rbank  <= 1'b0;
      s2_wbank  <= 1'b0;
      s3_bank   <= 1'b0;
      s2_busy   <= 1'b0;
      pre_x0    <= '{default: '0};
      pre_y0    <= '{default: '0};
      post_x0   <= '{default: '0};
      post_y0   <= '{default: '0};
    end else begin
      // stage 1 fills a bank of the input buffer
      if (s1_fire && blk_done) begin
        pre_full[s1_bank] <= 1'b1;
        pre_x0[s1_bank]   <= blk_x0;
        pre_y0[s1_bank]   <= blk_y0;
        s1_bank           <= !s1_bank;
      end
      // stage 2 moves a block from the input to the output buffer
      if (s2_start) s2_busy <= 1'b1;
      if (s2_done) begin
        s2_busy             <= 1'b0;
        pre_full[s2_rbank]  <= 1'b0;
        post_full[s2_wbank] <= 1'b1;
        post_x0[s2_wbank]   <= pre_x0[s2_rbank];
        post_y0[s2_wbank]   <= pre_y0[s2_rbank];
        s2_rbank            <= !s2_rbank;
        s2_wbank            <= !s2_wbank;
      end
      // stage 3 drains a bank of the output buffer
      if (s3_done) begin
        post_full[s3_bank] <= 1'b0;
        s3_bank            <= !s3_bank;
      end
    end
  end

  assign stat_pre_full  = pre_full;
  assign stat_post_full = post_full;
  assign stat_busy      = {s3_busy, s2_busy, s1_fire};

  // A bank is never refilled before it has been emptied.
  a_pre_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (s1_fire && blk_done) |-> !pre_full[s1_bank]);
  a_post_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    s2_done |-> !post_full[s2_wbank]);

endmodule
