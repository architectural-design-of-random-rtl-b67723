// fx_mul: two's-complement fixed-point multiplier.
//
// Forms the exact full-width product p = a * b of two signed operands. The
// binary point of p lies at the sum of the operands' fraction widths, so no
// bits are dropped: 4.12 x 2.14 gives 6.26 (normal), 4.12 x 4.12 gives 8.24
// (-2 ln U1) and 5.8 x 4.12 gives 9.20 (Rayleigh). The generator uses three of
// these, matching its three hardware multipliers; the full-width result is
// this design's reading of the output formats, which equal the sum of the
// operand formats.
//
// Interface: a (A_W bits), b (B_W bits) in; p (A_W + B_W bits) out.
// Timing: combinational.
module fx_mul #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb begin
    p = (A_W+B_W)'(a) * (A_W+B_W)'(b);
  end

endmodule
