// dmc_encoder: Decimal Matrix Code encoder (purely combinational).
//
// The N = K1*K2*M data bits are viewed as a K1 x K2 matrix of M-bit symbols,
// row r holding symbols r*K2 .. r*K2+K2-1 (bits r*K2*M upward). Two check
// fields are produced:
//   * h: for every row and every j < K2/2, the unsigned integer sum of symbol
//     j and symbol j+K2/2 of that row, M+1 bits wide. Group g occupies
//     h[g*(M+1) +: M+1]; with the default 2 x 8 x 4 shape group 0 is
//     D3..D0 + D19..D16 (H4..H0) and group 7 is D47..D44 + D63..D60 (H39..H35).
//   * v: for every column c of K2*M bits, the XOR of bit c of every row,
//     so V0 = D0 ^ D32 and V31 = D31 ^ D63 by default.
//   * u: the data bits themselves, passed on unchanged.
// The symbol pairing, sums, column parity and default sizes follow the code's
// definition; the output packing (group g at bits g*(M+1)) is this design's
// choice. There is no clock: results settle in the same cycle.
module dmc_encoder #(
  parameter int K1 = dmc_pkg::DMC_K1,
  parameter int K2 = dmc_pkg::DMC_K2,
  parameter int M  = dmc_pkg::DMC_M,
  localparam int N  = K1 * K2 * M,
  localparam int NG = K1 * K2 / 2,
  localparam int HW = NG * (M + 1),
  localparam int VW = K2 * M
) (
  input  logic [N-1:0]  d,
  output logic [HW-1:0] h,
  output logic [VW-1:0] v,
  output logic [N-1:0]  u
);

  localparam int HALF = K2 / 2;

  if (K2 % 2 != 0) begin : g_bad_k2
    $error("dmc_encoder: K2 must be even");
  end

  // Horizontal groups: one (M+1)-bit adder per symbol pair.
  for (genvar g = 0; g < NG; g++) begin : g_hadd
    localparam int ROW   = g / HALF;
    localparam int SYM_A = ROW * K2 + (g % HALF);
    localparam int SYM_B = SYM_A + HALF;
    assign h[g*(M+1) +: M+1] = {1'b0, d[SYM_A*M +: M]} + {1'b0, d[SYM_B*M +: M]};
  end

  // Vertical parity: XOR of one column across all rows.
  always_comb begin
    v = '0;
    for (int r = 0; r < K1; r++) v ^= d[r*VW +: VW];
  end

  assign u = d;

endmodule
