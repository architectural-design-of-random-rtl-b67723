// lut_circuit: table look-up of the two Box-Muller terms.
//
// y1 = sqrt(-2 ln U1) (4.12) and y2 = sin(2 pi U2) (2.14) are each read from a
// 4096 x 16 table made of four 1k x 16 block RAMs. Bits 11..2 of the uniform
// value address all four RAMs of a table at once; bits 1..0 pass through a
// 2-bit flip-flop so that they arrive together with the RAM data and drive a
// 4:1 mux that picks the bank holding the entry. This structure, the table
// sizes and the number formats follow the design.
//
// Interface: clk, u1, u2 (12-bit 0.12 fractions, normally two LFSR states)
// in; y1 (unsigned in value, 4.12) and y2 (signed 2.14) out.
// Timing: one cycle; y1/y2 belong to the u1/u2 present before the last
// rising edge. One result per clock.
module lut_circuit
  import rng_pkg::*;
(
  input  logic                    clk,
  input  logic [U_W-1:0]          u1,
  input  logic [U_W-1:0]          u2,
  output logic [Y1_W-1:0]         y1,
  output logic signed [Y2_W-1:0]  y2
);

  logic [LUT_DW-1:0] bank_y1 [LUT_BANKS];
  logic [LUT_DW-1:0] bank_y2 [LUT_BANKS];
  logic [1:0]        sel_y1_q;
  logic [1:0]        sel_y2_q;

  for (genvar b = 0; b < LUT_BANKS; b++) begin : g_bank
    lut_bram #(.FUNC(SQRT_LN), .BANK(b)) u_ram_y1 (
      .clk (clk),
      .addr(u1[U_W-1:2]),
      .dout(bank_y1[b])
    );
    lut_bram #(.FUNC(SIN_2PI), .BANK(b)) u_ram_y2 (
      .clk (clk),
      .addr(u2[U_W-1:2]),
      .dout(bank_y2[b])
    );
  end

  // 2-bit DFFs: bank select delayed to line up with the RAM read
  always_ff @(posedge clk) begin
    sel_y1_q <= u1[1:0];
    sel_y2_q <= u2[1:0];
  end

  // 4:1 muxes
  assign y1 = bank_y1[sel_y1_q];
  assign y2 = signed'(bank_y2[sel_y2_q]);

endmodule
