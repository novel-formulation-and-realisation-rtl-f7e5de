// stage3_scale: stage 3 of the pipeline.  For each block it produces
//     Y(0)  (formed in stage 1, passed through), then
//     Y(k) = (2*T(k) + x(0)) * cos(k*pi/(2N)),  k = 1..N-1,
// in natural order.
//
// For each k the unit reads T(k) from stage 2's output buffer, rounds it to
// an integer, shifts it up by one bit and adds x(0) (z = 2T(k) + x(0)).  It
// then multiplies z by the k-th word of an (N-1)-word table of
// round(2^CF * cos(k*pi/(2N))) in the bit-serial shift_add_mult, so no
// multiplier array is needed.
//
// Interface and timing.  A start pulse, with x0 and y0 of the block held
// until done, begins the block; Y(0) = y0 is output in the next cycle.  Each
// further output takes ZW+4 cycles (read request, two-cycle buffer latency,
// ZW multiply cycles, output).  out_valid pulses with out_k and out_y,
// signed fixed point with CF fraction bits; out_last and done mark Y(N-1).
// The shift, the add of x(0), the cosine table and the shift-add multiplier
// follow the document; rounding T(k) to an integer before the shift (which
// keeps the serial multiplier short) and the output format are this
// design's own choices.
module stage3_scale
  import dct_pkg::*;
#(
  parameter int N  = 7,
  parameter int XW = 11,          // width of x(0) and Y(0)
  parameter int TW = 27,          // width of T(k)
  parameter int F  = 12,          // fraction bits of T(k)
  parameter int CF = 12,          // fraction bits of the cosine table
  parameter int ZW = TW - F + 2,  // width of 2*round(T)+x(0)
  parameter int CW = CF + 1,
  parameter int YW = ZW + CW,
  parameter int IW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x0,
  input  logic signed [XW-1:0] y0,
  output logic                 busy,
  output logic                 done,
  // read port of stage 2's output buffer
  output logic                 rd_en,
  output logic [IW-1:0]        rd_m,
  input  logic                 rd_valid,
  input  logic signed [TW-1:0] rd_data,
  // results
  output logic                 out_valid,
  output logic [IW-1:0]        out_k,
  output logic signed [YW-1:0] out_y,
  output logic                 out_last
);

  typedef logic [CW-1:0] cos_t;
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_MUL} state_e;

  function automatic cos_t cos_init(int k);
    return cos_t'(cos_word(k, N, CF));
  endfunction

  // N-1 words: entry k-1 holds the factor for Y(k), k = 1..N-1
  cos_t cos_rom [N-1];
  for (genvar k = 1; k < N; k++) begin : g_cos
    assign cos_rom[k-1] = cos_init(k);
  end

  state_e               state_q;
  logic [IW-1:0]        m_q;
  logic signed [TW-F-1:0] t_round;
  logic signed [ZW-1:0] z;
  logic                 m_start, m_busy, m_done;
  logic signed [YW-1:0] m_p;

  // round half up to an integer, then 2*T + x(0)
  assign t_round = (TW-F)'((rd_data + TW'(1 << (F - 1))) >>> F);
  assign z       = (ZW'(t_round) <<< 1) + ZW'(x0);
  assign m_start = (state_q == S_WAIT) && rd_valid;

  shift_add_mult #(.ZW(ZW), .CW(CW), .PW(YW)) u_mult (
    .clk, .rst_n,
    .start(m_start), .z, .c(cos_rom[m_q - 1'b1]),
    .busy(m_busy), .done(m_done), .p(m_p)
  );

  assign rd_en = (state_q == S_READ);
  assign rd_m  = m_q;
  assign busy  = (state_q != S_IDLE) || done;   // done: the block is still being retired

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      m_q       <= IW'(1);
      out_valid <= 1'b0;
      out_k     <= '0;
      out_y     <= '0;
      out_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      case (state_q)
        S_IDLE:
          if (start) begin
            out_valid <= 1'b1;
            out_k     <= '0;
            out_y     <= YW'(y0) <<< CF;
            m_q       <= IW'(1);
            state_q   <= S_READ;
          end
        S_READ: state_q <= S_WAIT;
        S_WAIT: if (rd_valid) state_q <= S_MUL;
        S_MUL:
          if (m_done) begin
            out_valid <= 1'b1;
            out_k     <= m_q;
            out_y     <= m_p;
            if (m_q == IW'(N - 1)) begin
              out_last <= 1'b1;
              done     <= 1'b1;
              state_q  <= S_IDLE;
            end else begin
              m_q     <= m_q + 1'b1;
              state_q <= S_READ;
            end
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_mult_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy);

endmodule
