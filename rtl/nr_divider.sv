// nr_divider: unsigned non-restoring divider, one quotient per clock.
//
// Computes q = floor(n / d) for an N_W-bit dividend and a D_W-bit divisor by
// the non-restoring method: the partial remainder r starts at 0; for each
// dividend bit, most significant first, r is shifted left taking that bit in,
// then d is subtracted if r was non-negative or added if r was negative (no
// restore step); the quotient bit is 1 when the new r is non-negative. The
// N_W steps are unrolled into a combinational array of add/subtract rows, so
// the divider accepts a new operand pair every cycle. The design divides
// -ln U1 by lambda with a 30-bit non-restoring divider; the unrolled,
// register-free array is this design's reading of its one-sample-per-clock
// rate and its flip-flop budget, which leaves no room for pipeline
// registers.
//
// Interface: n (N_W bits), d (D_W bits) in; q (N_W bits) out. d must not be
// zero; for d = 0 the quotient has no meaning.
// Timing: combinational.
module nr_divider #(
  parameter int unsigned N_W = 30,
  parameter int unsigned D_W = 12
) (
  input  logic [N_W-1:0] n,
  input  logic [D_W-1:0] d,
  output logic [N_W-1:0] q
);

  localparam int unsigned R_W = D_W + 2;   // partial remainder, signed

  logic signed [R_W-1:0] d_ext;
  logic signed [R_W-1:0] r;

  assign d_ext = signed'(R_W'(d));

  always_comb begin
    r = '0;
    q = '0;
    for (int i = N_W - 1; i >= 0; i--) begin
      if (r[R_W-1]) r = {r[R_W-2:0], n[i]} + d_ext;
      else          r = {r[R_W-2:0], n[i]} - d_ext;
      q[i] = ~r[R_W-1];
    end
  end

endmodule
