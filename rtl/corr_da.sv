// corr_da: an L-point cyclic correlation T(k) = sum_{i=1..L} s(i) C(i+k),
// k = 1..L, computed by distributed arithmetic, with no multiplier.
//
// How it works.  The L input words (M bits, two's complement) sit in a ring
// of shift registers.  Every cycle each word rotates by one bit, and the L
// bits leaving the top of the words, one per word, form the address of a ROM
// of 2^L words; ROM word a holds round(2^F * sum_p a[p] C(p+2)).  An adder
// and a register accumulate acc = 2*acc + ROM[a], starting from 0, over the
// M bit planes, most significant plane first; the first plane is the sign
// plane and is subtracted.  After M cycles acc = 2^F * T(k) (up to ROM
// rounding) and the words are back in place; in that same cycle they also
// rotate by one word, which advances k.  L outputs take L*M cycles.
//
// Interface and timing.  A start pulse loads words[0..L-1] = s(1)..s(L); the
// unit is busy for exactly L*M cycles.  At the end of cycle M*k after start,
// t_valid pulses with t_k = k and t_data = T(k) in signed fixed point with F
// fraction bits; done pulses with the last output.  start while busy
// restarts the unit.
//
// The bit-serial ROM / adder / shift-register structure, the one-bit
// rotation per cycle and the one-word rotation every M cycles follow the
// document.  The MSB-first order (which keeps the result exact instead of
// shifting bits out of the accumulator), the subtraction on the sign plane
// and the fraction width F are this design's own choices.
module corr_da
  import dct_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int M  = 12,                        // word length of s(i)
  parameter int F  = 12,                        // ROM fraction bits
  parameter int L  = (N - 1) / 2,
  parameter int RW = F + $clog2(L + 1) + 1,     // ROM word width
  parameter int TW = M + RW,                    // result width
  parameter int KW = $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [M-1:0]  words [L],
  output logic                 busy,
  output logic                 t_valid,
  output logic [KW-1:0]        t_k,
  output logic signed [TW-1:0] t_data,
  output logic                 done
);

  localparam int BW = (M > 1) ? $clog2(M) : 1;
  typedef logic signed [RW-1:0] rom_t;

  function automatic rom_t rom_init(int a);
    return rom_t'(da_rom_word(a, N, G, F));
  endfunction

  rom_t rom [2**L];
  for (genvar a = 0; a < 2**L; a++) begin : g_rom
    assign rom[a] = rom_init(a);
  end

  logic [M-1:0]         sr [L];
  logic [BW-1:0]        bit_q;
  logic [KW-1:0]        k_q;
  logic signed [TW-1:0] acc_q;
  logic [L-1:0]         addr;
  logic signed [TW-1:0] rom_ext, acc_base, acc_next;
  logic                 last_bit;

  for (genvar p = 0; p < L; p++) begin : g_addr
    assign addr[p] = sr[p][M-1];
  end

  assign rom_ext  = TW'(rom[addr]);
  assign acc_base = (bit_q == '0) ? '0 : (acc_q <<< 1);
  assign acc_next = (bit_q == '0) ? acc_base - rom_ext : acc_base + rom_ext;
  assign last_bit = (bit_q == BW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      bit_q   <= '0;
      k_q     <= '0;
      acc_q   <= '0;
      t_valid <= 1'b0;
      t_k     <= '0;
      t_data  <= '0;
      done    <= 1'b0;
    end else begin
      t_valid <= 1'b0;
      done    <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        bit_q <= '0;
        k_q   <= '0;
      end else if (busy) begin
        acc_q <= acc_next;
        bit_q <= last_bit ? '0 : bit_q + 1'b1;
        if (last_bit) begin
          t_valid <= 1'b1;
          t_k     <= k_q + 1'b1;
          t_data  <= acc_next;
          if (k_q == KW'(L - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
      end
    end
  end

  // word ring: one-bit rotation every cycle, one-word rotation every M cycles
  always_ff @(posedge clk) begin
    if (start) begin
      for (int p = 0; p < L; p++) sr[p] <= words[p];
    end else if (busy) begin
      for (int p = 0; p < L; p++) begin
        if (last_bit) sr[p] <= {sr[(p + L - 1) % L][M-2:0], sr[(p + L - 1) % L][M-1]};
        else          sr[p] <= {sr[p][M-2:0], sr[p][M-1]};
      end
    end
  end

endmodule
