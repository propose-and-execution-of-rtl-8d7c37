// tb_dmc_corrector: self-checking test of the DMC error corrector.
// Every flagged bit must be inverted and every other bit kept, checked bit
// by bit on random words and masks.
module tb_dmc_corrector;
  int checks = 0, failures = 0;

  logic [63:0] d_rx, err, d_corr;

  dmc_corrector dut (.d_rx, .err, .d_corr);

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
    d_rx = 64'h0123_4567_89ab_cdef; err = '0; #1;
    check(d_corr == 64'h0123_4567_89ab_cdef, "no error, word unchanged");
    err = 64'h0000_0000_0000_000f; #1;
    check(d_corr == 64'h0123_4567_89ab_cde0, "low symbol inverted");

    for (int n = 0; n < 1000; n++) begin
      d_rx = {$urandom, $urandom}; err = {$urandom, $urandom};
      #1;
      for (int i = 0; i < 64; i++)
        check(d_corr[i] == (err[i] ? !d_rx[i] : d_rx[i]), $sformatf("bit %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
