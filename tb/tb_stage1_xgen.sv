// tb_stage1_xgen: checks the x-sequence generator.  Random blocks of N
// samples are sent in descending index order with random idle cycles; every
// x(i) is compared with the alternating sum y(i) - y(i+1) + y(i+2) - ...
// computed here, and at the end of each block x(0) and Y(0) = sum y(i) are
// checked, as is the pulse marking the end of the block.
module tb_stage1_xgen;
  localparam int N = 7, W_IN = 8, XW = W_IN + $clog2(N), IW = $clog2(N);
  localparam int NB = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W_IN-1:0] in_y = '0;
  logic x_valid, blk_done;
  logic [IW-1:0] x_idx;
  logic signed [XW-1:0] x_data, blk_x0, blk_y0;

  stage1_xgen #(.N(N), .W_IN(W_IN)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int y [N];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int b = 0; b < NB; b++) begin
      automatic int ysum = 0;
      for (int i = 0; i < N; i++) begin
        y[i] = (b == 0) ? 127 : (b == 1) ? -128 : $signed($urandom_range(255, 0)) - 128;
        ysum += y[i];
      end
      for (int i = N - 1; i >= 0; i--) begin
        automatic int xe = 0;
        for (int j = i; j < N; j++) xe += ((j - i) % 2 == 0) ? y[j] : -y[j];
        in_valid = 0;
        repeat ($urandom_range(2, 0)) begin @(posedge clk); #1; end
        in_valid = 1; in_y = W_IN'(y[i]);
        #1;
        check(x_valid && int'(x_idx) == i, $sformatf("index %0d", i));
        check(int'(x_data) == xe, $sformatf("blk %0d x(%0d)=%0d exp %0d", b, i, x_data, xe));
        check(blk_done == (i == 0), "blk_done");
        if (i == 0) begin
          check(int'(blk_x0) == xe, "x(0)");
          check(int'(blk_y0) == ysum, $sformatf("Y(0)=%0d exp %0d", blk_y0, ysum));
        end
        @(posedge clk); #1;
      end
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * N * 4 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
