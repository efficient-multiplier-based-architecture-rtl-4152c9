// fir_pkg -- shared constants, types and the default coefficient table of the
// transpose-form block FIR filter.
//
// The default sizes follow the architecture: 8-bit samples (B) and 8-bit
// coefficients (B'), because every product is formed by an unsigned 8x8 Vedic
// multiplier; block size L = 8; accumulation registers B+B' = 16 bits wide, so
// outputs are the filter sums modulo 2^16. The filter length N = 32 (M = N/L = 4
// inner-product units) and the number of selectable filters (4) are this
// design's own choices. The coefficient table is a placeholder formula
//   h_f(i) = (37*(f+1)*(i+1) + 11*f) mod 256
// that gives distinct, non-trivial filters; real coefficient sets are passed in
// through the COEFS parameter of the top.
package fir_pkg;

  localparam int unsigned B_DEF     = 8;   // input sample width
  localparam int unsigned BC_DEF    = 8;   // coefficient width (B')
  localparam int unsigned L_DEF     = 8;   // block size
  localparam int unsigned N_DEF     = 32;  // filter length
  localparam int unsigned ACC_W_DEF = B_DEF + BC_DEF;  // PAU register width
  localparam int unsigned NFILT_DEF = 4;   // coefficient sets held in the ROM

  // Largest table the parameter type can carry; the units use the leading
  // NFILT x N entries.
  localparam int unsigned NFILT_MAX = 8;
  localparam int unsigned N_MAX     = 128;

  typedef logic [15:0] coef_t;  // widest coefficient the table holds
  typedef coef_t [NFILT_MAX-1:0][N_MAX-1:0] coef_table_t;

  // Default coefficient table (see header).
  function automatic coef_table_t default_coefs();
    coef_table_t t;
    for (int f = 0; f < NFILT_MAX; f++)
      for (int i = 0; i < N_MAX; i++)
        t[f][i] = coef_t'((37 * (f + 1) * (i + 1) + 11 * f) % 256);
    return t;
  endfunction

endpackage
