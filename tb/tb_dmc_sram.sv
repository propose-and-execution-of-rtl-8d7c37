// tb_dmc_sram: self-checking test of the word memory with its upset port.
// Runs 4000 random cycles of writes, upsets and idle cycles against an
// array model and compares the asynchronous read data every cycle.
module tb_dmc_sram;
  int checks = 0, failures = 0, n_wr = 0, n_up = 0;

  localparam int W = 72, DEPTH = 16;
  logic clk = 1'b0;
  logic we, upset;
  logic [3:0] addr, upset_addr;
  logic [W-1:0] wdata, rdata, upset_mask;
  logic [W-1:0] model [DEPTH];

  dmc_sram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .rdata,
                                        .upset, .upset_addr, .upset_mask);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; upset = 1'b0; addr = '0; upset_addr = '0; wdata = '0; upset_mask = '0;
    // fill the memory
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 4'(a); wdata = {$urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      int op;
      @(negedge clk);
      op = $urandom_range(0, 2);
      addr = 4'($urandom); upset_addr = 4'($urandom);
      wdata = {$urandom, $urandom, $urandom};
      upset_mask = {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom};
      we = (op == 0); upset = (op == 1);
      #1;
      check(rdata == model[addr], $sformatf("read addr %0d", addr));
      @(posedge clk);
      if (we) begin model[addr] = wdata; n_wr++; end
      else if (upset) begin model[upset_addr] ^= upset_mask; n_up++; end
    end
    check(n_wr > 0 && n_up > 0, "writes and upsets exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
