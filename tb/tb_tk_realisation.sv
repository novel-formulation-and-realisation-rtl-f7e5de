// tb_tk_realisation: checks stage 2 as a whole for N = 7, G = 3.  x(1..6)
// are written in natural order into one input bank, a start pulse runs the
// stage, and T(1..6) are read back in natural order from the chosen output
// bank and compared with T(m) = sum_{i=1..6} x(i) cos(pi*i*m/7) in double
// precision.  done must come N+L*M+3 cycles after start.  Blocks alternate
// banks, and the next block is written while the previous one is computed.
module tb_tk_realisation;
  localparam int N = 7, G = 3, XW = 11, F = 12, M = XW + 1, L = 3;
  localparam int TW = M + F + 3;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 1.0;

  logic clk = 0, rst_n = 0;
  logic x_we = 0, x_wbank = 0, start = 0, pre_bank = 0, post_bank = 0, done;
  logic [2:0] x_waddr = '0, rd_m = '0;
  logic signed [XW-1:0] x_wdata = '0;
  logic rd_en = 0, rd_bank = 0, rd_valid;
  logic signed [TW-1:0] rd_data;

  tk_realisation #(.N(N), .G(G), .XW(XW), .F(F)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int xs [2][7];

  task automatic write_block(int b);
    for (int i = 1; i < N; i++) begin
      xs[b][i] = $signed($urandom_range(1790, 0)) - 895;
      x_we = 1; x_wbank = b; x_waddr = 3'(i); x_wdata = XW'(xs[b][i]);
      @(posedge clk); #1;
    end
    x_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    write_block(0);
    for (int rep = 0; rep < 100; rep++) begin
      int b, n;
      b = rep % 2;
      pre_bank = b; post_bank = b;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      write_block(1 - b);         // the other input bank fills meanwhile
      n = N;                      // cycles since the start pulse
      while (!done && n < 200) begin @(posedge clk); #1; n++; end
      checks++;
      if (n != N + L * M + 3) begin failures++; $display("FAIL: done after %0d cycles", n); end
      @(posedge clk); #1;
      for (int m = 1; m < N; m++) begin
        real tr, got;
        rd_en = 1; rd_bank = b; rd_m = 3'(m);
        @(posedge clk); #1;
        rd_en = 0;
        @(posedge clk); #1;
        tr = 0.0;
        for (int i = 1; i < N; i++) tr += real'(xs[b][i]) * $cos(PI * real'(i * m) / real'(N));
        got = real'(rd_data) / (2.0 ** F);
        checks++;
        if (!rd_valid || got - tr > TOL || tr - got > TOL) begin
          failures++; $display("FAIL: rep %0d T(%0d)=%f exp %f valid=%0d", rep, m, got, tr, rd_valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * 100 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
