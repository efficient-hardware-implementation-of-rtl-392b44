// tb_da_quantizer: random and boundary inputs; checks floor(din / 2^14)
// clipped to 16 bits, and the sat flag.
module tb_da_quantizer;
  logic signed [39:0] din;
  logic signed [15:0] dout;
  logic               sat;
  int checks = 0, failures = 0;

  da_quantizer #(.W(40), .N(16), .FRAC(14)) dut (.din, .dout, .sat);

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint v, q;
    bit s;
    int nsat = 0;
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0: v = 32767 * 16384;
        1: v = 32768 * 16384;
        2: v = -32768 * 16384;
        3: v = -32768 * 16384 - 1;
        4: v = -1;
        default: v = (i % 3 == 0) ? longint'($signed(40'({$urandom, $urandom})))
                                  : longint'($signed(31'($urandom)));
      endcase
      din = 40'(v);
      #1;
      q = v >>> 14; s = 0;
      if (q > 32767)  begin q = 32767;  s = 1; end
      if (q < -32768) begin q = -32768; s = 1; end
      nsat += s;
      checks += 2;
      if (longint'(dout) != q) begin failures++; $display("%0d -> %0d exp %0d", v, dout, q); end
      if (sat != s) begin failures++; $display("%0d sat %0d", v, sat); end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
