// tb_hw_module: checks both correlation branches for N = 7, G = 3.  Random
// x(1..6) are drawn; branch A receives x'(v) = x(<3^v>_7) and branch B
// e'(v) = (-1)^<3^v>_7 x'(v), v = 1..6.  After done, reading index j must
// give T(2j) from A and T(2j-1) from B, where
// T(m) = sum_{i=1..6} x(i) cos(pi*i*m/7) is evaluated here in double
// precision.  done must come 1 + L*M cycles after the last sample, and the
// result must land in the bank selected by wbank.
module tb_hw_module;
  localparam int N = 7, G = 3, XW = 11, F = 12, M = XW + 1, L = 3;
  localparam int TW = M + F + 3;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 1.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, wbank = 0;
  logic [2:0] in_v = '0;
  logic signed [XW-1:0] ua = '0, ub = '0;
  logic done_a, done_b, rv_a, rv_b, rd_en = 0, rd_bank = 0;
  logic [1:0] rd_idx = '0;
  logic signed [TW-1:0] rd_a, rd_b;

  hw_module #(.N(N), .G(G), .ODD(1'b0), .XW(XW), .F(F)) dut_a (
    .clk, .rst_n, .in_valid, .in_v, .in_u(ua), .wbank, .done(done_a),
    .rd_en, .rd_bank, .rd_idx, .rd_valid(rv_a), .rd_data(rd_a));
  hw_module #(.N(N), .G(G), .ODD(1'b1), .XW(XW), .F(F)) dut_b (
    .clk, .rst_n, .in_valid, .in_v, .in_u(ub), .wbank, .done(done_b),
    .rd_en, .rd_bank, .rd_idx, .rd_valid(rv_b), .rd_data(rd_b));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int gp [7] = '{1, 3, 2, 6, 4, 5, 1};   // <3^v>_7

  real tref [2][7];   // per bank, T(1..6)

  function automatic real t_of(int x [7], int m);
    real s;
    s = 0.0;
    for (int i = 1; i < N; i++) s += real'(x[i]) * $cos(PI * real'(i * m) / real'(N));
    return s;
  endfunction

  initial begin
    int x [7];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 100; rep++) begin
      int n;
      // two blocks, one into each bank
      for (int b = 0; b < 2; b++) begin
        for (int i = 1; i < N; i++)
          x[i] = (rep == 0) ? 895 : (rep == 1) ? -895 : $signed($urandom_range(1790, 0)) - 895;
        for (int m = 1; m < N; m++) tref[b][m] = t_of(x, m);
        wbank = b;
        for (int v = 1; v < N; v++) begin
          in_valid = 1; in_v = 3'(v);
          ua = XW'(x[gp[v]]);
          ub = XW'((gp[v] % 2 == 1) ? -x[gp[v]] : x[gp[v]]);
          @(posedge clk); #1;
        end
        in_valid = 0;
        n = 0;
        while (!done_a && n < 100) begin @(posedge clk); #1; n++; end
        checks += 2;
        if (n != 1 + L * M) begin failures++; $display("FAIL: done after %0d cycles", n); end
        if (done_b != done_a) begin failures++; $display("FAIL: branches out of step"); end
        @(posedge clk); #1;
      end
      // read both banks
      for (int b = 0; b < 2; b++) begin
        for (int j = 1; j <= L; j++) begin
          rd_en = 1; rd_bank = b; rd_idx = 2'(j);
          @(posedge clk); #1;
          rd_en = 0;
          @(posedge clk); #1;
          begin
            real ga, gb;
            ga = real'(rd_a) / (2.0 ** F);
            gb = real'(rd_b) / (2.0 ** F);
            checks += 3;
            if (!rv_a || !rv_b) begin failures++; $display("FAIL: read not valid"); end
            if (ga - tref[b][2*j] > TOL || tref[b][2*j] - ga > TOL) begin
              failures++; $display("FAIL: bank %0d T(%0d)=%f exp %f", b, 2*j, ga, tref[b][2*j]);
            end
            if (gb - tref[b][2*j-1] > TOL || tref[b][2*j-1] - gb > TOL) begin
              failures++; $display("FAIL: bank %0d T(%0d)=%f exp %f", b, 2*j-1, gb, tref[b][2*j-1]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * 120 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
