// dmc_syndrome: DMC syndrome calculator (purely combinational).
//
// Compares the check bits recomputed from the received data (h_rc, v_rc,
// produced by the shared encoder) with the check bits read from memory
// (h_st, v_st):
//   * dh[g] = h_rc group g - h_st group g, an integer subtraction done in
//     M+2 bits so that the signed difference (-(2^(M+1)-2) .. +(2^(M+1)-2))
//     is held exactly in two's complement;
//   * s = v_rc ^ v_st, one bit per column.
// A group with dh[g] != 0 and a column with s[c] == 1 point at erroneous
// data. The subtraction and XOR follow the code; the M+2-bit signed width of
// dh is this design's choice (any width that keeps non-zero differences
// non-zero would do).
module dmc_syndrome #(
  parameter int K1 = dmc_pkg::DMC_K1,
  parameter int K2 = dmc_pkg::DMC_K2,
  parameter int M  = dmc_pkg::DMC_M,
  localparam int NG = K1 * K2 / 2,
  localparam int HW = NG * (M + 1),
  localparam int VW = K2 * M
) (
  input  logic [HW-1:0]          h_rc,
  input  logic [HW-1:0]          h_st,
  input  logic [VW-1:0]          v_rc,
  input  logic [VW-1:0]          v_st,
  output logic [NG-1:0][M+1:0]   dh,
  output logic [VW-1:0]          s
);

  for (genvar g = 0; g < NG; g++) begin : g_hsub
    assign dh[g] = {1'b0, h_rc[g*(M+1) +: M+1]} - {1'b0, h_st[g*(M+1) +: M+1]};
  end

  assign s = v_rc ^ v_st;

endmodule
