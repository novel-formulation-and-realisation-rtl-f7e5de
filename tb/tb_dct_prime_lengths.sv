// tb_dct_prime_lengths: runs the whole DCT pipeline at four other odd prime
// lengths side by side, N = 5, 11, 13 and 17, each with a primitive root of
// its own, and checks every output against a double-precision DCT (see
// dct_len_harness).  This exercises the elaboration-time tables, the
// derived widths and the controllers away from the default N = 7.
module tb_dct_prime_lengths;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c [4], f [4];
  logic fin [4];

  dct_len_harness #(.N(5),  .G(2)) h5  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  dct_len_harness #(.N(11), .G(2)) h11 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  dct_len_harness #(.N(13), .G(2)) h13 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  dct_len_harness #(.N(17), .G(3)) h17 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
