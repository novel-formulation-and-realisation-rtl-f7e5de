// stage1_xgen: stage 1 of the pipeline.  Turns one block of N input samples
// y(i) into the sequence x(i) = y(i) - x(i+1), x(N-1) = y(N-1), and forms the
// DC coefficient Y(0) = sum y(i) at the same time.
//
// The recursion runs from the top index down, so the samples of a block must
// arrive in the order y(N-1), y(N-2), ..., y(0), one per accepted cycle
// (in_valid).  Each accepted sample produces x(i) combinationally on
// x_data/x_idx in the same cycle (x_valid = in_valid); a register holds the
// previous x for the next subtraction and a second register accumulates
// Y(0).  With the last sample, y(0), the block ends: blk_done pulses and
// blk_x0 / blk_y0 carry x(0) and Y(0) in that cycle.  Both registers then
// restart for the next block with no idle cycle.
//
// The two adder/register pairs follow the stage-1 block diagram; the sample
// order, the combinational output timing and the synchronous restart are
// this design's own choices.
module stage1_xgen #(
  parameter int N    = 7,
  parameter int W_IN = 8,
  parameter int XW   = W_IN + $clog2(N),   // width of x(i) and Y(0)
  parameter int IW   = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W_IN-1:0] in_y,
  output logic                 x_valid,
  output logic [IW-1:0]        x_idx,
  output logic signed [XW-1:0] x_data,
  output logic                 blk_done,
  output logic signed [XW-1:0] blk_x0,
  output logic signed [XW-1:0] blk_y0
);

  logic [IW-1:0]        idx_q;     // index of the sample expected next
  logic signed [XW-1:0] xprev_q;   // x(i+1)
  logic signed [XW-1:0] yacc_q;    // running sum of y
  logic signed [XW-1:0] y_ext;

  assign y_ext    = XW'(in_y);
  assign x_valid  = in_valid;
  assign x_idx    = idx_q;
  // First sample of a block: x(N-1) = y(N-1).
  assign x_data   = (idx_q == IW'(N - 1)) ? y_ext : y_ext - xprev_q;
  assign blk_done = in_valid && (idx_q == '0);
  assign blk_x0   = x_data;
  assign blk_y0   = ((idx_q == IW'(N - 1)) ? '0 : yacc_q) + y_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q   <= IW'(N - 1);
      xprev_q <= '0;
      yacc_q  <= '0;
    end else if (in_valid) begin
      xprev_q <= x_data;
      yacc_q  <= blk_y0;
      idx_q   <= (idx_q == '0) ? IW'(N - 1) : idx_q - 1'b1;
    end
  end

endmodule
