// tb_dmc_encoder: self-checking test of the 64-bit DMC encoder.
// Checks hand-worked words (all zeros, all ones, one word worked out group
// by group) and 2000 random words against a reference that adds the two
// 4-bit symbols of each pair as integers and XORs bit i with bit i+32.
module tb_dmc_encoder;
  int checks = 0, failures = 0;

  logic [63:0] d, u;
  logic [39:0] h;
  logic [31:0] v;

  dmc_encoder dut (.d(d), .h(h), .v(v), .u(u));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Reference: group g = row*4 + j adds symbol (row*8 + j) and (row*8 + j + 4).
  function automatic logic [39:0] ref_h(input logic [63:0] x);
    logic [39:0] r;
    for (int g = 0; g < 8; g++) begin
      int a, b, s;
      a = (g / 4) * 8 + (g % 4);
      b = a + 4;
      s = int'(x[a*4 +: 4]) + int'(x[b*4 +: 4]);
      r[g*5 +: 5] = 5'(s);
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_v(input logic [63:0] x);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = x[i] ^ x[i+32];
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
    d = '0; #1;
    check(h == '0 && v == '0 && u == '0, "all-zero word");

    d = '1; #1;
    // every symbol is 15, every pair sums to 30 = 5'b11110, columns cancel
    check(h == {8{5'b11110}}, "all-ones H");
    check(v == '0, "all-ones V");
    check(u == d, "all-ones U");

    // D3..D0 = 9, D19..D16 = 7 -> H4..H0 = 16; D47..D44 = 3, D63..D60 = 12
    // -> H39..H35 = 15; D0 = 1 with D32 = 0 -> V0 = 1; D31 = 0, D63 = 1 -> V31 = 1
    d = '0;
    d[3:0]   = 4'd9;
    d[19:16] = 4'd7;
    d[47:44] = 4'd3;
    d[63:60] = 4'd12;
    #1;
    check(h[4:0]   == 5'd16, "H4..H0 worked example");
    check(h[39:35] == 5'd15, "H39..H35 worked example");
    check(h[34:5]  == '0,    "untouched groups zero");
    check(v[0] == 1'b1 && v[31] == 1'b1, "V0 and V31 worked example");
    // V16..V19 see D16..D19 (7 = 0111) against D48..D51 (0)
    check(v[19:16] == 4'b0111, "V19..V16 worked example");

    for (int n = 0; n < 2000; n++) begin
      d = {$urandom, $urandom};
      #1;
      check(h == ref_h(d), $sformatf("random H d=%h h=%h", d, h));
      check(v == ref_v(d), $sformatf("random V d=%h v=%h", d, v));
      check(u == d, "random U");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
