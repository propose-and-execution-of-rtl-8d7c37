// tb_dmc_codec_ert: self-checking test of the DMC codec with the shared
// encoder (ERT). For each random word it encodes with en = 0, compares the
// check bits with an independent reference, then switches en to 1 and
// presents the word with an upset:
//   * a burst of 1..32 adjacent flipped cells inside one logical row: the
//     word must be detected, and recovered exactly whenever every symbol pair
//     the burst touches changes its sum (the code's guarantee);
//   * upsets of only vertical or only horizontal check bits: detected, data
//     returned unchanged;
//   * no upset: no detection, data unchanged.
// A directed 3-cell upset inside one symbol, which a single parity bit over
// those cells would not see, is checked first.
module tb_dmc_codec_ert;
  int checks = 0, failures = 0;
  int n_guaranteed = 0, n_cancelled = 0, n_max_burst = 0;

  logic        en;
  logic [63:0] d_wr, d_rx, d_corr, err_mask;
  logic [39:0] h_wr, h_rx;
  logic [31:0] v_wr, v_rx;
  logic        err_detect;

  dmc_codec_ert dut (.en, .d_wr, .h_wr, .v_wr, .d_rx, .h_rx, .v_rx,
                     .d_corr, .err_mask, .err_detect);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [39:0] ref_h(input logic [63:0] x);
    logic [39:0] r;
    for (int g = 0; g < 8; g++) begin
      int a;
      a = (g / 4) * 8 + (g % 4);
      r[g*5 +: 5] = 5'(int'(x[a*4 +: 4]) + int'(x[(a+4)*4 +: 4]));
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_v(input logic [63:0] x);
    return x[31:0] ^ x[63:32];
  endfunction

  // True when every symbol pair touched by e has a different sum in x ^ e.
  function automatic bit pair_sums_change(input logic [63:0] x, input logic [63:0] e);
    logic [39:0] h0, h1;
    h0 = ref_h(x);
    h1 = ref_h(x ^ e);
    for (int g = 0; g < 8; g++) begin
      int a;
      a = (g / 4) * 8 + (g % 4);
      if ((e[a*4 +: 4] != 0 || e[(a+4)*4 +: 4] != 0) && h0[g*5 +: 5] == h1[g*5 +: 5])
        return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic logic [63:0] burst(input int row, input int start, input int len);
    logic [63:0] m;
    m = '0;
    for (int i = start; i < start + len && i < 32; i++) m[row*32 + i] = 1'b1;
    return m;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d, e;
    logic [39:0] h;
    logic [31:0] v;
    // Directed case: symbol 0 holds 1001b and a 3-cell upset flips its bits
    // 0, 2 and 3 (1001b -> 0100b). A single parity bit over those cells would
    // miss it (three flips); here the column syndromes S0, S2, S3 and the
    // changed sum of symbols 0 and 4 (9 + 0 -> 4 + 0) locate all three.
    d = 64'h0000_0000_0000_0009;
    en = 1'b0; d_wr = d; d_rx = '0; h_rx = '0; v_rx = '0;
    #1;
    check(h_wr[4:0] == 5'd9 && v_wr == 32'h0000_0009, "directed word encoded");
    h = h_wr; v = v_wr;
    en = 1'b1; d_rx = d ^ 64'h000d; h_rx = h; v_rx = v;
    #1;
    check(err_detect && err_mask == 64'h000d && d_corr == d, "directed 3-bit upset corrected");
    for (int n = 0; n < 3000; n++) begin
      d = {$urandom, $urandom};
      // write: encode
      en = 1'b0; d_wr = d; d_rx = {$urandom, $urandom}; h_rx = '0; v_rx = '0;
      #1;
      check(h_wr == ref_h(d) && v_wr == ref_v(d), "encode mode check bits");
      h = h_wr; v = v_wr;

      // read with no upset
      en = 1'b1; d_wr = {$urandom, $urandom}; d_rx = d; h_rx = h; v_rx = v;
      #1;
      check(!err_detect && d_corr == d, "clean read");

      // read with an MCU burst in one row
      if (n % 10 == 0) e = burst(n % 20 == 0 ? 0 : 1, 0, 32);      // whole row
      else             e = burst($urandom_range(0, 1), $urandom_range(0, 31), $urandom_range(1, 32));
      d_rx = d ^ e;
      #1;
      check(err_detect, "burst detected");
      if (pair_sums_change(d, e)) begin
        n_guaranteed++;
        if ($countones(e) == 32) n_max_burst++;
        check(d_corr == d, $sformatf("burst corrected d=%h e=%h got=%h", d, e, d_corr));
        check(err_mask == e, "error mask equals the upset");
      end else begin
        n_cancelled++;
      end

      // vertical check bits only
      d_rx = d; v_rx = v ^ $urandom_range(1, 32'hffff_ffff); h_rx = h;
      #1;
      check(err_detect && d_corr == d, "V-only upset leaves data");
      // horizontal check bits only
      v_rx = v; h_rx = h ^ (40'd1 << $urandom_range(0, 39));
      #1;
      check(err_detect && d_corr == d, "H-only upset leaves data");
    end
    check(n_max_burst > 0, "at least one 32-bit upset corrected");
    $display("bursts guaranteed+corrected=%0d (32-bit: %0d), with cancelling pair sums=%0d",
             n_guaranteed, n_max_burst, n_cancelled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
