// rng_top: uniform, normal, exponential and Rayleigh random number generator.
//
// Two 12-bit LFSRs give the uniform variables U1 and U2 (0.12 fractions). A
// look-up circuit turns them into y1 = sqrt(-2 ln U1) and y2 = sin(2 pi U2).
// From these, three multipliers and a divider form one sample of each
// distribution per clock:
//   uniform     = U1                                   (0.12)
//   normal      = y1 * y2          Box-Muller, N(0,1)  (6.26, signed)
//   rayleigh    = sigma * y1       sigma*sqrt(-2 ln U) (9.20)
//   exponential = ((y1 * y1) >> 1) / lambda  = -ln(U1)/lambda   (13.17)
// The exponential path uses the inverse transform -ln(U)/lambda, which
// stands for -ln(1-U)/lambda since U and 1-U have the same distribution.
// The block structure, the number formats and the LFSR polynomial follow the
// design. The LFSR power-up values (U1 = 0x800, U2 = 0x100) are chosen so
// that the first samples match the design's published simulation trace.
//
// Interface: clk; lamda (lambda, 4.8) and sigma (5.8) are held steady by the
// user; lambda must be non-zero (for lambda = 0 the exponential output has
// no meaning). There is no reset pin: the LFSRs power up holding their
// seeds.
// Timing: uniform is the current U1. normal, exponential and rayleigh are
// computed from the table outputs, which are read in one clock, so they
// belong to the U1/U2 of the previous cycle; everything after the tables is
// combinational. One sample of every distribution per clock; the sequence
// repeats every 4095 cycles.
module rng_top
  import rng_pkg::*;
#(
  parameter logic [U_W-1:0] SEED_U1 = 12'h800,
  parameter logic [U_W-1:0] SEED_U2 = 12'h100
) (
  input  logic                      clk,
  input  logic [LAMDA_W-1:0]        lamda,
  input  logic [SIGMA_W-1:0]        sigma,
  output logic [U_W-1:0]            uniform,
  output logic signed [NORM_W-1:0]  normal,
  output logic [EXP_W-1:0]          exponential,
  output logic [RAYL_W-1:0]         rayleigh
);

  logic [U_W-1:0]           u1;
  logic [U_W-1:0]           u2;
  logic [Y1_W-1:0]          y1;
  logic signed [Y2_W-1:0]   y2;
  logic signed [2*Y1_W-1:0] y1_sq;       // -2 ln U1, 8.24
  logic signed [2*Y1_W-1:0] neg_ln_u1;   // -ln U1,   8.24
  logic [EXP_W-1:0]         dividend;
  logic signed [RAYL_W-1:0] rayl_p;

  lfsr #(.WIDTH(U_W), .SEED(SEED_U1)) u_lfsr_u1 (.clk(clk), .q(u1));
  lfsr #(.WIDTH(U_W), .SEED(SEED_U2)) u_lfsr_u2 (.clk(clk), .q(u2));

  lut_circuit u_lut (
    .clk(clk),
    .u1 (u1),
    .u2 (u2),
    .y1 (y1),
    .y2 (y2)
  );

  // normal: sqrt(-2 ln U1) * sin(2 pi U2)
  fx_mul #(.A_W(Y1_W), .B_W(Y2_W)) u_mul_normal (
    .a(signed'(y1)),
    .b(y2),
    .p(normal)
  );

  // -2 ln U1 = y1 * y1
  fx_mul #(.A_W(Y1_W), .B_W(Y1_W)) u_mul_square (
    .a(signed'(y1)),
    .b(signed'(y1)),
    .p(y1_sq)
  );

  // >>1: -2 ln U1 -> -ln U1
  assign neg_ln_u1 = y1_sq >>> 1;

  // Dividing an x.24 dividend by the x.8 lambda leaves 16 fraction bits;
  // one more left shift gives the 17 of the 13.17 result. -ln U1 < 8.32, so
  // the dividend fits 30 bits.
  assign dividend = {neg_ln_u1[EXP_W-2:0], 1'b0};

  nr_divider #(.N_W(EXP_W), .D_W(LAMDA_W)) u_div (
    .n(dividend),
    .d(lamda),
    .q(exponential)
  );

  // rayleigh: sigma * sqrt(-2 ln U1)
  fx_mul #(.A_W(SIGMA_W), .B_W(Y1_W)) u_mul_rayleigh (
    .a(signed'(sigma)),
    .b(signed'(y1)),
    .p(rayl_p)
  );

  assign uniform  = u1;
  assign rayleigh = RAYL_W'(rayl_p);

endmodule
