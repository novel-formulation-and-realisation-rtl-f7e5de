// pre_add: the pre-adder at the head of each correlation branch.  It folds
// the N-1 permuted samples of a block into L = (N-1)/2 sums
//     s(i) = u(i) + u(L+i),   i = 1..L,
// which is x''(i) for branch A (u = x') and e''(i) for branch B (u = e').
// The fold is possible because the correlation coefficients repeat with
// period L.
//
// Samples arrive as a stream (in_valid, in_v = 1..N-1, in_u) in increasing
// v.  The first L are held in registers; each of the last L is added to its
// partner as it arrives.  One cycle after the sample with v = N-1, sum_valid
// pulses and sum[0..L-1] hold s(1)..s(L) until the next block overwrites
// them.  The fold is the document's; the streaming order and register
// arrangement are this design's.
module pre_add #(
  parameter int N  = 7,
  parameter int W  = 11,       // input width
  parameter int SW = W + 1,    // sum width
  parameter int IW = $clog2(N),
  parameter int L  = (N - 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IW-1:0]        in_v,
  input  logic signed [W-1:0]  in_u,
  output logic                 sum_valid,
  output logic signed [SW-1:0] sum [L]
);

  logic signed [W-1:0] hold [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_valid <= 1'b0;
    else        sum_valid <= in_valid && (in_v == IW'(N - 1));
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < L; i++) begin
        if (32'(in_v) == i + 1)     hold[i] <= in_u;
        if (32'(in_v) == L + i + 1) sum[i]  <= SW'(hold[i]) + SW'(in_u);
      end
    end
  end

endmodule
