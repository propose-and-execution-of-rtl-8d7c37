// dmc_pkg: shared constants of the 64-bit Decimal Matrix Code (DMC).
//
// The 64-bit data word is cut into K = K1 x K2 = 2 x 8 symbols of M = 4 bits.
// Symbols 0..7 (bits 0..31) form logical row 0, symbols 8..15 (bits 32..63)
// row 1. Within a row, symbol j is paired with symbol j + K2/2 and the pair's
// integer sum is kept as an (M+1)-bit horizontal check group, giving
// 8 groups x 5 bits = 40 horizontal check bits H. Each of the 32 columns of
// the matrix is protected by one vertical parity bit V (XOR of the column).
// The 2 x 8 x 4 shape is the one the code is defined for; everything else in
// this package is derived from it. The memory depth is this design's own
// choice: the code itself does not fix one.
package dmc_pkg;

  localparam int DMC_K1 = 2;                              // logical rows
  localparam int DMC_K2 = 8;                              // symbols per row
  localparam int DMC_M  = 4;                              // bits per symbol
  localparam int DMC_N  = DMC_K1 * DMC_K2 * DMC_M;        // 64 data bits
  localparam int DMC_NG = DMC_K1 * DMC_K2 / 2;            // 8 horizontal groups
  localparam int DMC_HW = DMC_NG * (DMC_M + 1);           // 40 H bits
  localparam int DMC_VW = DMC_K2 * DMC_M;                 // 32 V bits
  localparam int DMC_RW = DMC_HW + DMC_VW;                // 72 redundant bits

  localparam int DMC_DEPTH = 16;                          // words of memory

  // Which horizontal group a data bit belongs to.
  function automatic int unsigned dmc_group_of(int unsigned bit_idx, int unsigned k2,
                                               int unsigned m);
    int unsigned sym, row, col_sym;
    sym     = bit_idx / m;
    row     = sym / k2;
    col_sym = (sym % k2) % (k2 / 2);
    return row * (k2 / 2) + col_sym;
  endfunction

endpackage
