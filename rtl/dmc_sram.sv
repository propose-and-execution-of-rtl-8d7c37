// dmc_sram: word memory used twice in the fault-tolerant memory, once for the
// information bits and once for the redundant (check) bits.
//
// DEPTH words of W bits, written synchronously on the rising clock edge when
// we is high. The read is asynchronous: rdata always shows word addr, so the
// decoder can work on it in the same cycle. A second port models radiation:
// when upset is high (and we is low) the word at upset_addr is XORed with
// upset_mask on the clock edge, which flips any chosen set of cells and thus
// produces a multiple cell upset (MCU) of arbitrary shape. The memory holds
// no reset; a word must be written before it is read. Depth, timing and the
// upset port are this design's choices: the memories are only named as
// information and redundancy SRAMs.
module dmc_sram #(
  parameter int W     = dmc_pkg::DMC_N,
  parameter int DEPTH = dmc_pkg::DMC_DEPTH,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic          upset,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)         mem[addr]       <= wdata;
    else if (upset) mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
  end

  assign rdata = mem[addr];

endmodule
