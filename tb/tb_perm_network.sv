// tb_perm_network: checks the table-lookup permutation networks against
// the index maps of the length-7 example with primitive root 3:
//   input side   x'(1..6) = x(3), x(2), x(6), x(4), x(5), x(1)
//   even output  T(2), T(4), T(6) sit at T'(3), T'(2), T'(1)
//   odd output   T(1), T(3), T(5) sit at T''(1), T''(2), T''(3)
// Each network is filled in both banks with random words, then read back by
// index; data must come from the mapped address of the requested bank and
// appear exactly two cycles after the request, with back-to-back requests.
module tb_perm_network;
  import dct_pkg::*;
  localparam int N = 7, G = 3, W = 16, L = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // expected maps (index -> address), from the worked example
  int map_pre  [7] = '{0, 3, 2, 6, 4, 5, 1};
  int map_even [4] = '{0, 3, 2, 1};
  int map_odd  [4] = '{0, 1, 2, 3};

  logic       we [3];
  logic       wbank [3], rd_en [3], rd_bank [3], rd_valid [3];
  logic [2:0] waddr [3], rd_idx [3];
  logic [W-1:0] wdata [3], rd_data [3];

  perm_network #(.N(N), .G(G), .MODE(PERM_PRE), .W(W), .DEPTH(N), .AW(3)) u_pre (
    .clk, .rst_n, .we(we[0]), .wbank(wbank[0]), .waddr(waddr[0]), .wdata(wdata[0]),
    .rd_en(rd_en[0]), .rd_bank(rd_bank[0]), .rd_idx(rd_idx[0]), .rd_valid(rd_valid[0]), .rd_data(rd_data[0]));
  perm_network #(.N(N), .G(G), .MODE(PERM_POST_EVEN), .W(W), .DEPTH(L + 1), .AW(2)) u_even (
    .clk, .rst_n, .we(we[1]), .wbank(wbank[1]), .waddr(waddr[1][1:0]), .wdata(wdata[1]),
    .rd_en(rd_en[1]), .rd_bank(rd_bank[1]), .rd_idx(rd_idx[1][1:0]), .rd_valid(rd_valid[1]), .rd_data(rd_data[1]));
  perm_network #(.N(N), .G(G), .MODE(PERM_POST_ODD), .W(W), .DEPTH(L + 1), .AW(2)) u_odd (
    .clk, .rst_n, .we(we[2]), .wbank(wbank[2]), .waddr(waddr[2][1:0]), .wdata(wdata[2]),
    .rd_en(rd_en[2]), .rd_bank(rd_bank[2]), .rd_idx(rd_idx[2][1:0]), .rd_valid(rd_valid[2]), .rd_data(rd_data[2]));

  int mem [3][2][8];

  function automatic int expect_addr(int n, int idx);
    case (n)
      0: return map_pre[idx];
      1: return map_even[idx];
      default: return map_odd[idx];
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3; n++) begin
      we[n] = 0; rd_en[n] = 0; wbank[n] = 0; rd_bank[n] = 0; waddr[n] = 0; rd_idx[n] = 0; wdata[n] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      // fill both banks of all three networks
      for (int b = 0; b < 2; b++) begin
        for (int a = 0; a < N; a++) begin
          for (int n = 0; n < 3; n++) begin
            automatic int depth = (n == 0) ? N : L + 1;
            we[n] = (a < depth); wbank[n] = b; waddr[n] = 3'(a);
            wdata[n] = W'($urandom);
            if (a < depth) mem[n][b][a] = int'(wdata[n]);
          end
          @(posedge clk); #1;
        end
      end
      for (int n = 0; n < 3; n++) we[n] = 0;
      // read back every index of both banks, one request per cycle
      for (int n = 0; n < 3; n++) begin
        automatic int last = (n == 0) ? N - 1 : L;
        int exp_q [$];
        for (int t = 0; t < 2 * last + 2; t++) begin
          automatic int b = (t / last) % 2;
          automatic int idx = t % last + 1;
          if (t < 2 * last) begin
            rd_en[n] = 1; rd_bank[n] = b; rd_idx[n] = 3'(idx);
            exp_q.push_back(mem[n][b][expect_addr(n, idx)]);
          end else rd_en[n] = 0;
          @(posedge clk); #1;
          // data for the request issued in the previous iteration
          begin
            checks++;
            if (t >= 1 && t - 1 < 2 * last) begin
              automatic int e = exp_q.pop_front();
              if (!rd_valid[n] || int'(rd_data[n]) != e) begin
                failures++;
                $display("FAIL: net %0d req %0d got v=%0d %h exp %h", n, t - 1, rd_valid[n], rd_data[n], e);
              end
            end else if (rd_valid[n]) begin
              failures++; $display("FAIL: net %0d early valid", n);
            end
          end
        end
        rd_en[n] = 0;
        repeat (2) @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
