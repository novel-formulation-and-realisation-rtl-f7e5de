// tb_sign_mult: checks e'(v) = (-1)^<3^v>_7 x'(v) for the length-7 example.
// <3^v>_7 for v = 1..6 is 3, 2, 6, 4, 5, 1, so v = 1, 5 and 6 negate.
module tb_sign_mult;
  localparam int N = 7, G = 3, W = 11;
  logic [2:0] v;
  logic signed [W-1:0] x_data, e_data;
  int checks = 0, failures = 0;
  bit negates [7] = '{0, 1, 0, 0, 0, 1, 1};

  sign_mult #(.N(N), .G(G), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int xv, e;
      v = 3'($urandom_range(6, 1));
      xv = $signed($urandom_range(1791, 0)) - 895;
      x_data = W'(xv);
      #1;
      e = negates[v] ? -xv : xv;
      checks++;
      if (int'(e_data) != e) begin
        failures++; $display("FAIL: v=%0d x=%0d e=%0d exp %0d", v, xv, e_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
