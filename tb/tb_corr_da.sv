// tb_corr_da: checks the distributed-arithmetic correlator for L = 3
// (N = 7, G = 3).  For random 12-bit inputs s(1..3) the outputs must equal
// the cyclic correlation T(k) = sum_i s(i) C(i+k), with
// C(n) = cos(2*pi*<3^n>_7/7), to within the coefficient rounding (checked
// against double precision), and must match bit for bit a model of the
// bit-plane accumulation built here from its own coefficient table.  The k-th
// output must appear M*k cycles after start, and done with the last.
module tb_corr_da;
  localparam int N = 7, G = 3, M = 12, F = 12, L = 3;
  localparam int RW = F + 3, TW = M + RW;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 1.0;   // in units of T

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [M-1:0] words [L];
  logic busy, t_valid, done;
  logic [1:0] t_k;
  logic signed [TW-1:0] t_data;

  corr_da #(.N(N), .G(G), .M(M), .F(F)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // <3^n>_7 for n = 0..5
  int gp [6] = '{1, 3, 2, 6, 4, 5};
  function automatic real c_of(int n);
    return $cos(2.0 * PI * real'(gp[n % 6]) / 7.0);
  endfunction

  // bit-plane model: plane b uses the coefficient sum for the bits of the
  // three words, sign plane negative
  function automatic longint model(int s [L], int k);
    longint acc;
    acc = 0;
    for (int b = M - 1; b >= 0; b--) begin
      real cs;
      longint w;
      cs = 0.0;
      for (int i = 1; i <= L; i++)
        if (((s[i-1] >> b) & 1) != 0) cs += c_of(i + k);
      w = longint'(cs * (2.0 ** F));
      acc = (b == M - 1) ? -w : 2 * acc + w;
    end
    return acc;
  endfunction

  initial begin
    int s [L];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 300; rep++) begin
      int t0;
      for (int i = 0; i < L; i++) begin
        s[i] = (rep == 0) ? 2047 : (rep == 1) ? -2048 : (rep == 2 && i == 1) ? 1 :
               (rep == 2) ? 0 : $signed($urandom_range(4095, 0)) - 2048;
        words[i] = M'(s[i]);
      end
      @(posedge clk); #1;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      t0 = 0;
      for (int k = 1; k <= L; k++) begin
        int waited;
        waited = 0;
        while (!t_valid && waited < 100) begin
          @(posedge clk); #1; waited++;
        end
        t0 += waited;
        checks++;
        if (t0 != M * k) begin
          failures++; $display("FAIL: output %0d after %0d cycles, expected %0d", k, t0, M * k);
        end
        begin
          real tr;
          real got;
          longint mv;
          tr = 0.0;
          for (int i = 1; i <= L; i++) tr += real'(s[i-1]) * c_of(i + k);
          got = real'(t_data) / (2.0 ** F);
          mv  = model(s, k);
          checks += 3;
          if (int'(t_k) != k) begin failures++; $display("FAIL: t_k=%0d exp %0d", t_k, k); end
          if (got - tr > TOL || tr - got > TOL) begin
            failures++; $display("FAIL: rep %0d T(%0d)=%f exp %f", rep, k, got, tr);
          end
          if (longint'(t_data) != mv) begin
            failures++; $display("FAIL: rep %0d T(%0d) bits %0d model %0d", rep, k, t_data, mv);
          end
          checks++;
          if (done != (k == L)) begin failures++; $display("FAIL: done at k=%0d", k); end
        end
        @(posedge clk); #1; t0++;
      end
      checks++;
      if (busy) begin failures++; $display("FAIL: still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * 60 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
