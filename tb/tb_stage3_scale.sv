// tb_stage3_scale: checks stage 3 for N = 7.  A model of stage 2's output
// buffer answers each read request two cycles later with a random T(m)
// (F fraction bits).  Expected outputs are computed here:
// Y(0) = y0 * 2^CF, and Y(m) = (2*round(T(m)) + x0) * round(2^CF cos(m*pi/14))
// exactly, in order m = 0..6, with out_last and done on Y(6).  The outputs
// must be spaced ZW+4 cycles apart, Y(1) ZW+4 cycles after Y(0).
module tb_stage3_scale;
  localparam int N = 7, XW = 11, TW = 27, F = 12, CF = 12;
  localparam int ZW = TW - F + 2, YW = ZW + CF + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [XW-1:0] x0 = '0, y0 = '0;
  logic busy, done, rd_en, rd_valid = 0, out_valid, out_last;
  logic [2:0] rd_m, out_k;
  logic signed [TW-1:0] rd_data = '0;
  logic signed [YW-1:0] out_y;

  stage3_scale #(.N(N), .XW(XW), .TW(TW), .F(F), .CF(CF)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint tv [7];

  // buffer model: two-cycle read latency
  logic v1 = 0;
  logic [2:0] m1 = '0;
  always @(posedge clk) begin
    v1 <= rd_en;
    m1 <= rd_m;
    rd_valid <= v1;
    if (v1) rd_data <= TW'(tv[m1]);
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 100; rep++) begin
      int x0i, y0i, k, last_t, tcount;
      x0i = $signed($urandom_range(1790, 0)) - 895;
      y0i = $signed($urandom_range(1790, 0)) - 895;
      for (int m = 1; m < N; m++)
        tv[m] = (rep == 0) ? longint'(5376) * 4096 - 1 : (rep == 1) ? -longint'(5376) * 4096 :
                longint'($signed($urandom_range(1 << 20, 0))) * 21 - longint'(22020096) + (longint'($urandom) & 4095);
      x0 = XW'(x0i); y0 = XW'(y0i);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      k = 0; tcount = 0; last_t = 0;
      while (k < N && tcount < 500) begin
        if (out_valid) begin
          longint e;
          if (k == 0) e = longint'(y0i) * 4096;
          else begin
            longint tr, cw;
            tr = (tv[k] + 2048) >>> F;
            cw = longint'($cos(PI * real'(k) / 14.0) * 4096.0);
            e  = (2 * tr + x0i) * cw;
          end
          checks += 3;
          if (int'(out_k) != k || longint'(out_y) != e) begin
            failures++; $display("FAIL: rep %0d k=%0d/%0d Y=%0d exp %0d", rep, out_k, k, out_y, e);
          end
          if (out_last != (k == N - 1) || done != (k == N - 1)) begin
            failures++; $display("FAIL: out_last/done at k=%0d", k);
          end
          if (k == 1 && tcount - last_t != ZW + 4) begin
            failures++; $display("FAIL: spacing %0d expected %0d", tcount - last_t, ZW + 4);
          end else if (k > 1 && tcount - last_t != ZW + 4) begin
            failures++; $display("FAIL: spacing %0d expected %0d", tcount - last_t, ZW + 4);
          end
          last_t = tcount;
          k++;
        end
        @(posedge clk); #1; tcount++;
      end
      checks++;
      if (k != N) begin failures++; $display("FAIL: only %0d outputs", k); end
      repeat ($urandom_range(3, 0)) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * 200 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
