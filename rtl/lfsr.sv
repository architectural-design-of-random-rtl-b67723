// lfsr: Fibonacci linear feedback shift register, the uniform source.
//
// A chain of WIDTH D flip-flops clocked every cycle. Stage 1 is bit 0; each
// clock the register shifts towards the high end (stage k feeds stage k+1)
// and stage 1 takes the XOR of the tapped stages. With the default taps,
// stages 12, 6, 4 and 1, the feedback polynomial is x^12 + x^6 + x^4 + x + 1
// and the register runs through all 4095 non-zero states before repeating.
// The register, the polynomial and the tap stages follow the design; the
// power-up value SEED is this design's choice.
//
// Interface: clk in, q out (the current state, read as the 0.12 fraction
// q/4096). There is no reset pin: the register powers up holding SEED, as an
// FPGA flip-flop takes its configured initial value. SEED must not be 0.
// Timing: q changes on every rising clock edge; one new value per cycle.
module lfsr #(
  parameter int unsigned     WIDTH = 12,
  parameter logic [WIDTH-1:0] TAPS = 12'b1000_0010_1001,  // stages 12, 6, 4, 1
  parameter logic [WIDTH-1:0] SEED = 12'h800
) (
  input  logic             clk,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] state = SEED;   // power-up value
  logic             feedback;

  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    state <= {state[WIDTH-2:0], feedback};
  end

  assign q = state;

endmodule
