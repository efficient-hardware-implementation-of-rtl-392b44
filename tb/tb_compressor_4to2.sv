// tb_compressor_4to2: random and sign-extended small operands; checks the
// four-operand sum against sum + carry (mod 2^W) and, for operands of small
// magnitude, that both output vectors stay small as signed numbers (the
// property the DA accumulator's guard bits rely on).
module tb_compressor_4to2;
  localparam int W = 16;
  logic [W-1:0] in0, in1, in2, in3, s, cy;
  int checks = 0, failures = 0;

  compressor_4to2 #(.W(W)) dut (.in0, .in1, .in2, .in3, .sum(s), .carry(cy));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      if (i % 2) begin
        in0 = W'($urandom); in1 = W'($urandom); in2 = W'($urandom); in3 = W'($urandom);
      end else begin
        // operands in [-512, 511]
        in0 = W'($signed(10'($urandom))); in1 = W'($signed(10'($urandom)));
        in2 = W'($signed(10'($urandom))); in3 = W'($signed(10'($urandom)));
      end
      #1;
      checks++;
      if (W'(in0 + in1 + in2 + in3) != W'(s + cy)) begin
        failures++; $display("sum mismatch %h %h %h %h", in0, in1, in2, in3);
      end
      if (i % 2 == 0) begin
        checks++;
        if ($signed(s) > 16'sd4096 || $signed(s) < -16'sd4096 ||
            $signed(cy) > 16'sd4096 || $signed(cy) < -16'sd4096) begin
          failures++; $display("vectors grew: %h %h", s, cy);
        end
        checks++;
        if (int'($signed(s)) + int'($signed(cy)) !=
            int'($signed(in0)) + int'($signed(in1)) + int'($signed(in2)) + int'($signed(in3)))
          failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
