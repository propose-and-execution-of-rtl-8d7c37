// topdecimal: fault-tolerant memory protected by the 64-bit Decimal Matrix
// Code (DMC), with the encoder reused by the decoder (ERT).
//
// Structure: one dmc_codec_ert (a single DMC encoder plus syndrome
// calculator, error locator and error corrector), an information memory of
// DEPTH x 64 bits and a redundancy memory of DEPTH x 72 bits (40 horizontal
// check bits H in [39:0], 32 vertical check bits V in [71:40]).
//
// Operations, one per clock cycle (we and re must not be high together):
//   write (we=1): the encoder runs in encode mode on din; din is written to
//                 the information memory and {V,H} to the redundancy memory
//                 at addr on the rising edge.
//   read  (re=1): the encoder runs in syndrome mode on the stored word at
//                 addr; the corrected word is registered into dout, the raw
//                 stored data into d1 and the syndrome flag into err_detect,
//                 all valid in the cycle after the read (rd_valid = 1 then).
//   upset (upset=1, we=0): the stored word at upset_addr is XORed with
//                 upset_info_mask / upset_red_mask, modelling a multiple cell
//                 upset in the cells. It may coincide with a read of another
//                 or the same address; the read then sees the old contents.
// rst (synchronous, active high) clears the output registers only.
//
// The data path (encoder -> two SRAMs -> decoder using ERT, En driven by the
// read/write signals) and the port names din, dout, d1, clk and rst follow
// the described design. Addressing, the read latency of one cycle, the
// upset port standing in for radiation and the err_detect / rd_valid outputs
// are this design's choices.
module topdecimal #(
  parameter int DEPTH = dmc_pkg::DMC_DEPTH,
  localparam int N  = dmc_pkg::DMC_N,
  localparam int HW = dmc_pkg::DMC_HW,
  localparam int VW = dmc_pkg::DMC_VW,
  localparam int RW = dmc_pkg::DMC_RW,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  din,
  input  logic          upset,
  input  logic [AW-1:0] upset_addr,
  input  logic [N-1:0]  upset_info_mask,
  input  logic [RW-1:0] upset_red_mask,
  output logic [N-1:0]  dout,
  output logic [N-1:0]  d1,
  output logic          rd_valid,
  output logic          err_detect
);

  logic          en;
  logic [N-1:0]  info_rd;
  logic [RW-1:0] red_rd, red_wr;
  logic [HW-1:0] h_wr;
  logic [VW-1:0] v_wr;
  logic [N-1:0]  d_corr;
  logic          det;

  // En: encoder is part of the decoder during a read, an encoder otherwise.
  assign en = re & ~we;

  dmc_codec_ert u_codec (
    .en        (en),
    .d_wr      (din),
    .h_wr      (h_wr),
    .v_wr      (v_wr),
    .d_rx      (info_rd),
    .h_rx      (red_rd[HW-1:0]),
    .v_rx      (red_rd[RW-1:HW]),
    .d_corr    (d_corr),
    .err_mask  (),
    .err_detect(det)
  );

  assign red_wr = {v_wr, h_wr};

  dmc_sram #(.W(N), .DEPTH(DEPTH)) u_sram_info (
    .clk, .we, .addr, .wdata(din), .rdata(info_rd),
    .upset, .upset_addr, .upset_mask(upset_info_mask)
  );

  dmc_sram #(.W(RW), .DEPTH(DEPTH)) u_sram_red (
    .clk, .we, .addr, .wdata(red_wr), .rdata(red_rd),
    .upset, .upset_addr, .upset_mask(upset_red_mask)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dout       <= '0;
      d1         <= '0;
      rd_valid   <= 1'b0;
      err_detect <= 1'b0;
    end else begin
      rd_valid <= en;
      if (en) begin
        dout       <= d_corr;
        d1         <= info_rd;
        err_detect <= det;
      end
    end
  end

  // A cycle is either a write or a read: the shared encoder cannot do both.
  a_one_op: assert property (@(posedge clk) disable iff (rst) !(we && re))
    else $error("topdecimal: we and re asserted together");

endmodule
