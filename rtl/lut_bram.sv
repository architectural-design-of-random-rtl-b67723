// lut_bram: one 1k x 16 block RAM of an elementary-function table.
//
// A table of 4096 entries is split over four of these banks; bank BANK holds
// the entries whose index has BANK in its two low bits, so word a of the bank
// is entry 4*a + BANK of the table. The contents, sqrt(-2 ln u) or
// sin(2 pi u) as chosen by FUNC, are computed when the memory is initialised
// (see rng_pkg::lut_entry); nothing writes the memory afterwards, so it is a
// ROM. The bank size, its width and its use as a table follow the design;
// the interleaving order of the banks is read from the address bits the
// design gives (bits 11..2 to the RAMs, bits 1..0 to the output mux).
//
// Interface: clk, addr (10 bits) in; dout (16 bits) out.
// Timing: synchronous read, as a block RAM: dout holds the word addressed at
// the previous rising edge.
module lut_bram
  import rng_pkg::*;
#(
  parameter lut_func_e   FUNC = SQRT_LN,
  parameter int unsigned BANK = 0
) (
  input  logic                clk,
  input  logic [BANK_AW-1:0]  addr,
  output logic [LUT_DW-1:0]   dout
);

  logic [LUT_DW-1:0] mem [2**BANK_AW];

  initial begin
    for (int unsigned a = 0; a < 2**BANK_AW; a++) begin
      mem[a] = lut_entry(FUNC, a * LUT_BANKS + BANK);
    end
  end

  always_ff @(posedge clk) begin
    dout <= mem[addr];
  end

endmodule
