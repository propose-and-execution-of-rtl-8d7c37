// dmc_codec_ert: DMC encoder and decoder sharing one encoder (encoder-reuse
// technique, ERT). Purely combinational.
//
// A single dmc_encoder instance serves both directions, chosen by en:
//   en = 0 (write): the encoder sees d_wr and its h/v outputs are the check
//                   bits to be stored alongside the data (h_wr, v_wr).
//   en = 1 (read) : the encoder sees the received data d_rx and recomputes
//                   the check bits; dmc_syndrome compares them with the
//                   received check bits h_rx/v_rx, dmc_locator turns the
//                   syndromes into a per-bit error mask and dmc_corrector
//                   inverts those bits, giving d_corr.
// The data reaching the corrector is the encoder's pass-through output u, so
// in read mode it is exactly the received word. Sharing the encoder, the En
// control (write = encode, read = compute syndromes) and the
// syndrome/locator/corrector chain follow the described decoder; err_mask
// and err_detect are brought out for observation, which is this design's
// choice. In write mode the decoder outputs are meaningless and in read mode
// h_wr/v_wr carry the recomputed check bits.
module dmc_codec_ert #(
  parameter int K1 = dmc_pkg::DMC_K1,
  parameter int K2 = dmc_pkg::DMC_K2,
  parameter int M  = dmc_pkg::DMC_M,
  localparam int N  = K1 * K2 * M,
  localparam int NG = K1 * K2 / 2,
  localparam int HW = NG * (M + 1),
  localparam int VW = K2 * M
) (
  input  logic          en,        // 0: encode (write), 1: syndrome/decode (read)
  // write side
  input  logic [N-1:0]  d_wr,
  output logic [HW-1:0] h_wr,
  output logic [VW-1:0] v_wr,
  // read side
  input  logic [N-1:0]  d_rx,
  input  logic [HW-1:0] h_rx,
  input  logic [VW-1:0] v_rx,
  output logic [N-1:0]  d_corr,
  output logic [N-1:0]  err_mask,
  output logic          err_detect
);

  logic [N-1:0]         enc_in, enc_u;
  logic [HW-1:0]        enc_h;
  logic [VW-1:0]        enc_v;
  logic [NG-1:0][M+1:0] dh;
  logic [VW-1:0]        s;

  assign enc_in = en ? d_rx : d_wr;

  dmc_encoder #(.K1(K1), .K2(K2), .M(M)) u_enc (
    .d(enc_in), .h(enc_h), .v(enc_v), .u(enc_u)
  );

  assign h_wr = enc_h;
  assign v_wr = enc_v;

  dmc_syndrome #(.K1(K1), .K2(K2), .M(M)) u_syn (
    .h_rc(enc_h), .h_st(h_rx), .v_rc(enc_v), .v_st(v_rx), .dh(dh), .s(s)
  );

  dmc_locator #(.K1(K1), .K2(K2), .M(M)) u_loc (
    .dh(dh), .s(s), .err(err_mask), .err_detect(err_detect)
  );

  dmc_corrector #(.N(N)) u_cor (
    .d_rx(enc_u), .err(err_mask), .d_corr(d_corr)
  );

endmodule
