// tb_da_lut_rom: reads every word of two tables (3 taps, BCF = 2, the
// biquad's feed-forward coefficients; 2 taps, BCF = 3, full-scale
// coefficients) and compares it with sum_k A_k * u_k, u_k the unsigned
// BCF-bit group of tap k in the address.
module tb_da_lut_rom;
  int checks = 0, failures = 0;

  logic [5:0]  addr0;
  logic [20:0] data0;
  da_lut_rom #(.TAPS(3), .BCF(2), .CW(16), .R(21),
               .COEFS({16'sd1105, 16'sd2210, 16'sd1105})) dut0 (.addr(addr0), .data(data0));

  logic [5:0]  addr1;
  logic [20:0] data1;
  da_lut_rom #(.TAPS(2), .BCF(3), .CW(16), .R(21),
               .COEFS({-16'sd32768, 16'sd32767})) dut1 (.addr(addr1), .data(data1));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint e;
    for (int a = 0; a < 64; a++) begin
      addr0 = 6'(a); addr1 = 6'(a);
      #1;
      e = 1105 * (a & 3) + 2210 * ((a >> 2) & 3) + 1105 * ((a >> 4) & 3);
      checks++;
      if (longint'($signed(data0)) != e) begin failures++; $display("rom0[%0d]=%0d exp %0d", a, $signed(data0), e); end
      e = 32767 * (a & 7) - 32768 * ((a >> 3) & 7);
      checks++;
      if (longint'($signed(data1)) != e) begin failures++; $display("rom1[%0d]=%0d exp %0d", a, $signed(data1), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
