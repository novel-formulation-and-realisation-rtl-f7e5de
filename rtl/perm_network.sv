// perm_network: permutation by table lookup.  A ROM holds the permutation
// table and a RAM holds the data, so reading index i returns the word stored
// at address TABLE[i].  Reading a block out in index order therefore returns
// it permuted, without a switch network.
//
// The RAM has two banks so that one block can be written while the previous
// one is read (it doubles as the pipeline buffer between two stages).  The
// write port stores wdata at address waddr of bank wbank.  A read request
// (rd_en, rd_idx, rd_bank) takes two cycles, one access per memory: the ROM
// is read in the first and the RAM in the second, and rd_valid / rd_data
// appear two cycles after the request.  One request can be issued per cycle.
//
// MODE selects the table (see dct_pkg): the input permutation
// v -> <G^v>_N, or one of the two output permutations.  The ROM/RAM
// arrangement and the two accesses follow the document; the banking, the
// registered outputs and the table contents for the output side are this
// design's reading of it.
module perm_network
  import dct_pkg::*;
#(
  parameter int         N     = 7,
  parameter int         G     = 3,
  parameter perm_mode_e MODE  = PERM_PRE,
  parameter int         W     = 11,
  parameter int         DEPTH = (MODE == PERM_PRE) ? N : (N - 1) / 2 + 1,
  parameter int         AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port, natural address
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // read port, by index
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_idx,
  output logic          rd_valid,
  output logic [W-1:0]  rd_data
);

  typedef logic [AW-1:0] addr_t;

  function automatic addr_t rom_init(int i);
    return addr_t'(perm_entry(MODE, i, N, G));
  endfunction

  addr_t      rom [DEPTH];
  logic [W-1:0] ram [2][DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = rom_init(i);
  end

  addr_t addr_q;
  logic  bank_q;
  logic  v1_q;

  // first access: the permutation ROM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q     <= 1'b0;
      addr_q   <= '0;
      bank_q   <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      v1_q     <= rd_en;
      rd_valid <= v1_q;
      if (rd_en) begin
        addr_q <= (32'(rd_idx) < DEPTH) ? rom[rd_idx] : '0;
        bank_q <= rd_bank;
      end
    end
  end

  // second access: the data RAM; write port
  always_ff @(posedge clk) begin
    if (v1_q) rd_data <= ram[bank_q][addr_q];
    if (we && 32'(waddr) < DEPTH) ram[wbank][waddr] <= wdata;
  end

endmodule
