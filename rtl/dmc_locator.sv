// dmc_locator: DMC error locator (purely combinational).
//
// Data bit i lies in column c = i mod (K2*M) and in horizontal group
// g = row*(K2/2) + (symbol mod K2) mod (K2/2), symbol = i / M. The bit is
// flagged as erroneous when its column's vertical syndrome is set AND its
// group's horizontal syndrome is non-zero:
//     err[i] = s[c] & (dh[g] != 0)
// The vertical syndrome names the column (which bit inside which symbol
// column) and the horizontal syndrome names the row (which pair of symbols),
// so any upset pattern that touches only one row is located, provided the
// integer sum of every touched symbol pair changes. The rule follows the
// decimal-matrix decoding principle; written as a per-bit AND it is this
// design's own formulation. err_detect is set when any syndrome is non-zero,
// including upsets that hit only the check bits and need no data correction.
module dmc_locator #(
  parameter int K1 = dmc_pkg::DMC_K1,
  parameter int K2 = dmc_pkg::DMC_K2,
  parameter int M  = dmc_pkg::DMC_M,
  localparam int N  = K1 * K2 * M,
  localparam int NG = K1 * K2 / 2,
  localparam int VW = K2 * M
) (
  input  logic [NG-1:0][M+1:0] dh,
  input  logic [VW-1:0]        s,
  output logic [N-1:0]         err,
  output logic                 err_detect
);

  logic [NG-1:0] grp_bad;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    assign grp_bad[g] = |dh[g];
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam int G = int'(dmc_pkg::dmc_group_of(i, K2, M));
    assign err[i] = s[i % VW] & grp_bad[G];
  end

  assign err_detect = (|grp_bad) | (|s);

endmodule
