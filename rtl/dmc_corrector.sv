// dmc_corrector: DMC error corrector (purely combinational).
//
// Inverts every received data bit that the error locator has flagged:
// d_corr = d_rx ^ err. This is the last stage of the decoder; correcting
// by inverting the located bits follows the code's decoding procedure.
// No clock: the result settles in the same cycle.
module dmc_corrector #(
  parameter int N = dmc_pkg::DMC_N
) (
  input  logic [N-1:0] d_rx,
  input  logic [N-1:0] err,
  output logic [N-1:0] d_corr
);

  assign d_corr = d_rx ^ err;

endmodule
