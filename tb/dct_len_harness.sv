// dct_len_harness: drives one dct_prime_da built for transform length N
// (primitive root G) with NB random blocks sent back to back, and compares
// every Y(k) with a double-precision DCT.  The tolerance is the worst-case
// rounding error of the fixed-point datapath:
//   DA ROM rounding on T(k)      2^(M-F-1)
//   rounding T(k) to an integer  0.5       (both doubled by 2T(k))
//   cosine table rounding        |z|max * 2^-(CF+1)
// plus 0.5 of margin.  Reports its counts on ports; finished rises when
// all blocks are out.
module dct_len_harness #(
  parameter int N  = 5,
  parameter int G  = 2,
  parameter int NB = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int  W_IN = 8, F = 12, CF = 12;
  localparam int  XW = W_IN + $clog2(N), M = XW + 1, L = (N - 1) / 2;
  localparam int  TW = M + F + $clog2(L + 1) + 1, ZW = TW - F + 2, YW = ZW + CF + 1;
  localparam real PI = 3.14159265358979323846;
  localparam real ZMAX = real'((2 * (N - 1) + 1) * N) * 128.0;
  localparam real TOL = 2.0 * ((2.0 ** (M - F - 1)) + 0.5) + ZMAX / (2.0 ** (CF + 1)) + 0.5;

  logic in_valid, in_ready, out_valid, out_last;
  logic signed [W_IN-1:0] in_y;
  logic [$clog2(N)-1:0] out_k;
  logic signed [YW-1:0] out_y;
  logic [1:0] spf, spo;
  logic [2:0] sb;

  dct_prime_da #(.N(N), .G(G)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y,
    .out_valid, .out_k, .out_y, .out_last,
    .stat_pre_full(spf), .stat_post_full(spo), .stat_busy(sb));

  int  ys  [NB][N];
  real ref_y [NB][N];

  initial begin
    checks = 0; failures = 0; finished = 0;
    in_valid = 0; in_y = '0;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < N; i++)
        ys[b][i] = (b == 0) ? 127 : (b == 1) ? ((i % 2 == 0) ? 127 : -128) : $signed($urandom_range(255, 0)) - 128;
      for (int k = 0; k < N; k++) begin
        real s;
        s = 0.0;
        for (int i = 0; i < N; i++) s += real'(ys[b][i]) * $cos(PI * real'((2 * i + 1) * k) / real'(2 * N));
        ref_y[b][k] = s;
      end
    end
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int b = 0; b < NB; b++)
      for (int i = N - 1; i >= 0; i--) begin
        in_valid = 1; in_y = W_IN'(ys[b][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
    in_valid = 0;
  end

  int ob = 0, ok = 0;
  real maxerr = 0.0;
  always @(posedge clk) if (rst_n && out_valid && ob < NB) begin
    real got, err;
    got = real'(out_y) / (2.0 ** CF);
    err = got - ref_y[ob][ok];
    if (err < 0.0) err = -err;
    if (err > maxerr) maxerr = err;
    checks = checks + 1;
    if (int'(out_k) != ok || err > TOL || out_last != (ok == N - 1)) begin
      failures = failures + 1;
      $display("FAIL: N=%0d block %0d Y(%0d)=%f expected %f (k=%0d)", N, ob, ok, got, ref_y[ob][ok], out_k);
    end
    if (ok == N - 1) begin
      ok = 0; ob = ob + 1;
      if (ob == NB) begin
        finished = 1;
        $display("N=%0d G=%0d: %0d blocks, max |error| %f, bound %f", N, G, NB, maxerr, TOL);
      end
    end else ok = ok + 1;
  end
endmodule
