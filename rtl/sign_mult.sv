// sign_mult: the sign multiplier in front of correlation branch B.  It forms
// e'(v) = (-1)^<G^v>_N * x'(v) for the permuted sample x'(v) = x(<G^v>_N),
// i.e. e(i) = (-1)^i x(i) taken in permuted order.  Multiplying by +-1 needs
// only a conditional negation; the sign for each index v comes from a small
// table of parities of <G^v>_N built at elaboration.  Purely combinational:
// e_data follows x_data and v in the same cycle.  The operation is the
// document's; the table-of-parities realisation is this design's.
// x_data never reaches -2^(W-1) in this datapath (|x| <= N*2^(W_IN-1)),
// so the negation cannot overflow.
module sign_mult
  import dct_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int W  = 11,
  parameter int IW = $clog2(N)
) (
  input  logic [IW-1:0]       v,
  input  logic signed [W-1:0] x_data,
  output logic signed [W-1:0] e_data
);

  logic [N-1:0] odd_tab;
  for (genvar i = 0; i < N; i++) begin : g_tab
    assign odd_tab[i] = (i == 0) ? 1'b0 : 1'(pow_mod(G, i, N) % 2);
  end

  logic neg;
  assign neg    = (32'(v) < N) ? odd_tab[v] : 1'b0;
  assign e_data = neg ? -x_data : x_data;

endmodule
