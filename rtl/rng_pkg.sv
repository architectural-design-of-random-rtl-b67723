// rng_pkg: fixed-point formats and elementary-function tables shared by the
// random number generator.
//
// Every quantity is a two's-complement fixed-point number; the integer field
// counts the sign bit. The formats are those of the generator's number
// table: U1/U2 0.12 (unsigned), sqrt(-2 ln U1) 4.12, sin(2 pi U2) 2.14,
// lambda 4.8, sigma 5.8, normal 6.26, exponential 13.17, Rayleigh 9.20.
//
// lut_entry() gives the content of the 4096-entry look-up tables, rounded to
// nearest:
//   SQRT_LN: round(4096  * sqrt(-2 ln(i/4096)))   (4.12)
//   SIN_2PI: round(16384 * sin(2 pi i/4096))      (2.14)
// Index 0 never occurs (a maximal-length LFSR never holds zero); its SQRT_LN
// entry is this design's choice and is taken at i = 1/2.
package rng_pkg;

  // widths of the signals of the generator
  localparam int unsigned U_W      = 12;  // U1, U2 and the uniform output, 0.12
  localparam int unsigned Y1_W     = 16;  // sqrt(-2 ln U1), 4.12
  localparam int unsigned Y1_FRAC  = 12;
  localparam int unsigned Y2_W     = 16;  // sin(2 pi U2), 2.14
  localparam int unsigned Y2_FRAC  = 14;
  localparam int unsigned LAMDA_W  = 12;  // lambda, 4.8
  localparam int unsigned SIGMA_W  = 13;  // sigma, 5.8
  localparam int unsigned NORM_W   = 32;  // normal sample, 6.26
  localparam int unsigned EXP_W    = 30;  // exponential sample, 13.17
  localparam int unsigned RAYL_W   = 29;  // Rayleigh sample, 9.20

  // geometry of one table: four 1k x 16 block RAMs
  localparam int unsigned LUT_BANKS  = 4;
  localparam int unsigned BANK_AW    = 10;
  localparam int unsigned LUT_DW     = 16;

  typedef enum logic [0:0] {
    SQRT_LN = 1'b0,   // sqrt(-2 ln u)
    SIN_2PI = 1'b1    // sin(2 pi u)
  } lut_func_e;

  localparam real PI = 3.14159265358979323846;

  function automatic logic [LUT_DW-1:0] lut_entry(lut_func_e func, int unsigned idx);
    real u;
    real v;
    if (func == SQRT_LN) begin
      u = (idx == 0) ? 0.5 / 4096.0 : real'(idx) / 4096.0;
      v = $sqrt(-2.0 * $ln(u)) * real'(2**Y1_FRAC);
    end else begin
      u = real'(idx) / 4096.0;
      v = $sin(2.0 * PI * u) * real'(2**Y2_FRAC);
    end
    return LUT_DW'(int'($floor(v + 0.5)));
  endfunction

endpackage
