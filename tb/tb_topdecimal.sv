// tb_topdecimal: end-to-end test of the DMC-protected memory at its default
// size (16 words of 64 data bits, 72 check bits each).
//
// Every address is first written. Then 3000 random operations are run, each
// on a random address:
//   write       - store a fresh random word (encoder in encode mode);
//   clean read  - read back, expect the word, no detection;
//   MCU read    - flip a burst of 1..32 adjacent cells in one logical row of
//                 the information memory, then read: d1 must show the upset
//                 word, err_detect must be set, and dout must be the original
//                 word whenever every touched symbol pair changed its sum;
//   check-bit read - flip only vertical or only horizontal check bits, then
//                 read: detected, data unchanged.
// After an upset the address is rewritten so that upsets do not pile up.
// Each read must give rd_valid exactly one cycle later. Every mechanism
// (encode, decode, correction, 32-bit correction, check-bit-only upset) must
// occur at least once.
module tb_topdecimal;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_corrected = 0, n_corr32 = 0, n_red_only = 0, n_cancel = 0;

  logic clk = 1'b0;
  logic rst, we, re, upset;
  logic [3:0] addr, upset_addr;
  logic [63:0] din, upset_info_mask, dout, d1;
  logic [71:0] upset_red_mask;
  logic rd_valid, err_detect;
  logic [63:0] model [16];

  topdecimal dut (.clk, .rst, .we, .re, .addr, .din, .upset, .upset_addr,
                  .upset_info_mask, .upset_red_mask, .dout, .d1, .rd_valid, .err_detect);

  always #5 clk = ~clk;

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

  task automatic idle();
    we = 1'b0; re = 1'b0; upset = 1'b0;
    upset_info_mask = '0; upset_red_mask = '0;
  endtask

  task automatic do_write(input logic [3:0] a, input logic [63:0] x);
    @(negedge clk);
    idle(); we = 1'b1; addr = a; din = x;
    @(negedge clk);
    idle();
    model[a] = x;
    n_write++;
  endtask

  task automatic do_upset(input logic [3:0] a, input logic [63:0] mi, input logic [71:0] mr);
    @(negedge clk);
    idle(); upset = 1'b1; upset_addr = a; upset_info_mask = mi; upset_red_mask = mr;
    @(negedge clk);
    idle();
  endtask

  // Read, check the one-cycle latency and return the outputs.
  task automatic do_read(input logic [3:0] a, output logic [63:0] q, output logic [63:0] raw,
                         output logic det);
    @(negedge clk);
    idle(); re = 1'b1; addr = a; din = {$urandom, $urandom};
    check(!rd_valid, "rd_valid low before the read");
    @(negedge clk);
    idle();
    check(rd_valid, "rd_valid one cycle after the read");
    q = dout; raw = d1; det = err_detect;
    @(negedge clk);
    check(!rd_valid, "rd_valid is a single pulse");
    n_read++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] q, raw, e;
    logic det;
    logic [3:0] a;
    rst = 1'b1; idle(); addr = '0; upset_addr = '0; din = '0;
    repeat (3) @(negedge clk);
    check(dout == '0 && d1 == '0 && !rd_valid && !err_detect, "outputs cleared by reset");
    rst = 1'b0;

    for (int i = 0; i < 16; i++) do_write(4'(i), {$urandom, $urandom});

    for (int n = 0; n < 3000; n++) begin
      a = 4'($urandom);
      case ($urandom_range(0, 3))
        0: do_write(a, {$urandom, $urandom});
        1: begin
          do_read(a, q, raw, det);
          check(q == model[a] && raw == model[a] && !det, $sformatf("clean read addr %0d", a));
        end
        2: begin
          if (n % 8 == 0) e = burst($urandom_range(0, 1), 0, 32);
          else            e = burst($urandom_range(0, 1), $urandom_range(0, 31), $urandom_range(1, 32));
          do_upset(a, e, '0);
          do_read(a, q, raw, det);
          check(raw == (model[a] ^ e), "d1 shows the upset word");
          check(det, "row MCU detected");
          if (pair_sums_change(model[a], e)) begin
            check(q == model[a], $sformatf("MCU corrected addr %0d e=%h", a, e));
            n_corrected++;
            if ($countones(e) == 32) n_corr32++;
          end else begin
            n_cancel++;
          end
          do_write(a, {$urandom, $urandom});
        end
        default: begin
          logic [71:0] mr;
          mr = '0;
          if ($urandom_range(0, 1) == 1) mr[71:40] = 32'($urandom_range(1, 32'hffff_ffff));
          else                           mr[$urandom_range(0, 39)] = 1'b1;
          do_upset(a, '0, mr);
          do_read(a, q, raw, det);
          check(q == model[a] && raw == model[a] && det, "check-bit-only upset");
          n_red_only++;
          do_write(a, {$urandom, $urandom});
        end
      endcase
    end

    $display("writes=%0d reads=%0d corrected=%0d corrected_32bit=%0d checkbit_only=%0d cancelled=%0d",
             n_write, n_read, n_corrected, n_corr32, n_red_only, n_cancel);
    check(n_write > 0, "encode (write) mode used");
    check(n_read > 0, "syndrome (read) mode used");
    check(n_corrected > 0, "MCU correction happened");
    check(n_corr32 > 0, "32-bit MCU correction happened");
    check(n_red_only > 0, "check-bit-only upset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
