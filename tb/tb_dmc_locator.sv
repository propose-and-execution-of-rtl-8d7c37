// tb_dmc_locator: self-checking test of the DMC error locator.
// A bit must be flagged exactly when its column's vertical syndrome is set
// and the horizontal syndrome of its symbol pair is non-zero. Bit i is in
// column i mod 32; its pair is (row, symbol-in-row mod 4) with row = i / 32.
// Checks a single-bit case worked by hand and 3000 random syndromes.
module tb_dmc_locator;
  int checks = 0, failures = 0;

  logic [7:0][5:0] dh;
  logic [31:0] s;
  logic [63:0] err;
  logic err_detect;

  dmc_locator dut (.dh, .s, .err, .err_detect);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [63:0] ref_err(input logic [7:0][5:0] dhx, input logic [31:0] sx);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) begin
      int row, sym_in_row, g;
      row        = i / 32;
      sym_in_row = (i % 32) / 4;
      g          = row * 4 + (sym_in_row % 4);
      r[i] = sx[i % 32] && (dhx[g] != 0);
    end
    return r;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dh = '0; s = '0; #1;
    check(err == '0 && !err_detect, "no syndrome, no error");

    // an upset of D37 (row 1, symbol 9, column 5): group 5 and S5
    dh[5] = 6'h3c; s[5] = 1'b1; #1;
    check(err == 64'h0000_0020_0000_0000, "single bit D37 located");
    check(err_detect, "single bit detected");

    // check-bit-only upset: S set, no group -> detect, nothing corrected
    dh = '0; s = 32'h0000_0100; #1;
    check(err == '0 && err_detect, "V-only upset");
    dh[2] = 6'd1; s = '0; #1;
    check(err == '0 && err_detect, "H-only upset");

    for (int n = 0; n < 3000; n++) begin
      for (int g = 0; g < 8; g++) dh[g] = ($urandom_range(0, 2) == 0) ? 6'($urandom) : 6'd0;
      s = $urandom & $urandom;
      #1;
      check(err == ref_err(dh, s), $sformatf("random err dh=%h s=%h", dh, s));
      check(err_detect == ((dh != 0) || (s != 0)), "random detect");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
