// tb_da_msb_rom: reads every word of two MSB-correction tables and compares
// it with -2^BCF * sum_k A_k * s_k.
module tb_da_msb_rom;
  int checks = 0, failures = 0;

  logic [2:0]  addr0;
  logic [20:0] data0;
  da_msb_rom #(.TAPS(3), .BCF(2), .CW(16), .R(21),
               .COEFS({16'sd1105, 16'sd2210, 16'sd1105})) dut0 (.addr(addr0), .data(data0));

  logic [3:0]  addr1;
  logic [22:0] data1;
  da_msb_rom #(.TAPS(4), .BCF(1), .CW(16), .R(23),
               .COEFS({-16'sd32768, -16'sd32768, 16'sd32767, -16'sd5})) dut1 (.addr(addr1), .data(data1));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint c0 [3] = '{1105, 2210, 1105};
    longint c1 [4] = '{-5, 32767, -32768, -32768};
    longint e;
    for (int a = 0; a < 16; a++) begin
      addr0 = 3'(a); addr1 = 4'(a);
      #1;
      if (a < 8) begin
        e = 0;
        for (int k = 0; k < 3; k++) if (a[k]) e += c0[k];
        e = -4 * e;
        checks++;
        if (longint'($signed(data0)) != e) begin failures++; $display("msb0[%0d]=%0d exp %0d", a, $signed(data0), e); end
      end
      e = 0;
      for (int k = 0; k < 4; k++) if (a[k]) e += c1[k];
      e = -2 * e;
      checks++;
      if (longint'($signed(data1)) != e) begin failures++; $display("msb1[%0d]=%0d exp %0d", a, $signed(data1), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
