// tb_compressor_6to2: random and sign-extended small operands; checks the
// six-operand sum against sum + carry (mod 2^W) and, for small operands,
// the exact signed identity.
module tb_compressor_6to2;
  localparam int W = 16;
  logic [W-1:0] in [6];
  logic [W-1:0] s, cy;
  int checks = 0, failures = 0;

  compressor_6to2 #(.W(W)) dut (.in0(in[0]), .in1(in[1]), .in2(in[2]), .in3(in[3]),
                                .in4(in[4]), .in5(in[5]), .sum(s), .carry(cy));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] ref_sum;
      int           ref_int;
      ref_sum = '0; ref_int = 0;
      for (int j = 0; j < 6; j++) begin
        in[j] = (i % 2) ? W'($urandom) : W'($signed(10'($urandom)));
        ref_sum += in[j];
        ref_int += int'($signed(in[j]));
      end
      #1;
      checks++;
      if (ref_sum != W'(s + cy)) begin failures++; $display("sum mismatch at %0d", i); end
      if (i % 2 == 0) begin
        checks++;
        if (int'($signed(s)) + int'($signed(cy)) != ref_int) begin
          failures++; $display("signed identity broken at %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
