// tb_dmc_syndrome: self-checking test of the DMC syndrome calculator.
// Random recomputed/stored check bits; each horizontal syndrome group must
// equal the signed integer difference recomputed - stored, and the vertical
// syndrome the bitwise XOR. Also checks that equal inputs give zero syndromes.
module tb_dmc_syndrome;
  int checks = 0, failures = 0;

  logic [39:0] h_rc, h_st;
  logic [31:0] v_rc, v_st, s;
  logic [7:0][5:0] dh;

  dmc_syndrome dut (.h_rc, .h_st, .v_rc, .v_st, .dh, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h_rc = 40'h12_3456_789a; h_st = h_rc; v_rc = 32'hdead_beef; v_st = v_rc; #1;
    check(dh == '0 && s == '0, "equal inputs give zero syndrome");

    // group 0: recomputed 3, stored 30 -> -27
    h_rc = '0; h_st = '0; h_rc[4:0] = 5'd3; h_st[4:0] = 5'd30; #1;
    check($signed(dh[0]) == -27, "group 0 difference -27");
    // group 7: recomputed 30, stored 0 -> +30
    h_rc[39:35] = 5'd30; #1;
    check($signed(dh[7]) == 30, "group 7 difference +30");

    for (int n = 0; n < 2000; n++) begin
      h_rc = {$urandom, $urandom}; h_st = {$urandom, $urandom};
      v_rc = $urandom; v_st = $urandom;
      #1;
      for (int g = 0; g < 8; g++) begin
        int diff;
        diff = int'(h_rc[g*5 +: 5]) - int'(h_st[g*5 +: 5]);
        check(int'($signed(dh[g])) == diff, $sformatf("dh[%0d]", g));
      end
      check(s == (v_rc ^ v_st), "vertical syndrome");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
