// tb_pre_add: streams blocks of N-1 = 6 random samples u(1..6) (with random
// idle cycles) and checks, one cycle after the last, the folded sums
// s(i) = u(i) + u(i+3) and the single-cycle sum_valid pulse.
module tb_pre_add;
  localparam int N = 7, W = 11, L = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [2:0] in_v = '0;
  logic signed [W-1:0] in_u = '0;
  logic sum_valid;
  logic signed [W:0] sum [L];

  pre_add #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    int u [7];
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      for (int v = 1; v < N; v++) begin
        u[v] = (b == 0) ? 1023 : (b == 1) ? -1024 : $signed($urandom_range(2047, 0)) - 1024;
        in_valid = 0;
        repeat ($urandom_range(2, 0)) begin
          @(posedge clk); #1;
          checks++;
          if (sum_valid) begin failures++; $display("FAIL: spurious sum_valid"); end
        end
        in_valid = 1; in_v = 3'(v); in_u = W'(u[v]);
        @(posedge clk); #1;
      end
      in_valid = 0;
      checks++;
      if (!sum_valid) begin failures++; $display("FAIL: no sum_valid"); end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (int'(sum[i]) != u[i + 1] + u[i + 1 + L]) begin
          failures++; $display("FAIL: blk %0d s(%0d)=%0d exp %0d", b, i + 1, sum[i], u[i + 1] + u[i + 1 + L]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
