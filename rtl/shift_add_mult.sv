// shift_add_mult: bit-serial shift-add multiplier, p = z * c.
//
// A shifter presents one bit of the signed multiplicand z per cycle, most
// significant bit first; the bit is ANDed with every bit of the coefficient
// word c, and an adder with a register (cleared at the start) accumulates
// acc = 2*acc + (bit & c).  The first bit is z's sign bit and its partial
// product is subtracted, so z is taken as two's complement.  c is unsigned.
//
// Timing: start loads z and c; the unit is busy for ZW cycles and done
// pulses with p valid at the end of the ZW-th cycle after start; p holds
// until the next result.  The shifter / AND / adder / register structure
// follows the document's shift-add circuit; the bit order and the sign
// handling are this design's.
module shift_add_mult #(
  parameter int ZW = 17,           // multiplicand width (signed)
  parameter int CW = 13,           // coefficient width (unsigned)
  parameter int PW = ZW + CW       // product width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [ZW-1:0] z,
  input  logic [CW-1:0]        c,
  output logic                 busy,
  output logic                 done,
  output logic signed [PW-1:0] p
);

  localparam int BW = $clog2(ZW);

  logic [ZW-1:0]        sh_q;     // shifter
  logic [CW-1:0]        c_q;
  logic [BW-1:0]        cnt_q;
  logic signed [PW-1:0] acc_q, pp, acc_next;

  assign pp       = sh_q[ZW-1] ? PW'(signed'({1'b0, c_q})) : '0;   // AND gate row
  assign acc_next = (cnt_q == '0) ? -pp : (acc_q <<< 1) + pp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      acc_q <= '0;
      sh_q  <= '0;
      c_q   <= '0;
      p     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        cnt_q <= '0;
        sh_q  <= z;
        c_q   <= c;
        acc_q <= '0;
      end else if (busy) begin
        acc_q <= acc_next;
        sh_q  <= sh_q << 1;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == BW'(ZW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= acc_next;
        end
      end
    end
  end

endmodule
