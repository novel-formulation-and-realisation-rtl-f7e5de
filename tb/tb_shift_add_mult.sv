// tb_shift_add_mult: random signed multiplicands (including the extremes)
// times random unsigned coefficients; the product must be exact and done
// must pulse exactly ZW cycles after start.
module tb_shift_add_mult;
  localparam int ZW = 17, CW = 13, PW = ZW + CW;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [ZW-1:0] z = '0;
  logic [CW-1:0] c = '0;
  logic busy, done;
  logic signed [PW-1:0] p;

  shift_add_mult #(.ZW(ZW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      longint zi, ci, n;
      zi = (t == 0) ? -65536 : (t == 1) ? 65535 : (t == 2) ? 0 : longint'($signed($urandom_range(131071, 0))) - 65536;
      ci = (t == 0 || t == 1) ? 8191 : longint'($urandom_range(8191, 0));
      z = ZW'(zi); c = CW'(ci);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      z = ZW'($urandom); c = CW'($urandom);   // inputs are latched at start
      n = 0;
      while (!done && n < 100) begin @(posedge clk); #1; n++; end
      checks += 2;
      if (n != ZW) begin failures++; $display("FAIL: %0d cycles, expected %0d", n, ZW); end
      if (longint'(p) != zi * ci) begin
        failures++; $display("FAIL: %0d * %0d = %0d got %0d", zi, ci, zi * ci, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500 * 25 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
