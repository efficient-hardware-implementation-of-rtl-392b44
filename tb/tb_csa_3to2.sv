// tb_csa_3to2: random and corner operands; checks a+b+c == sum+carry
// (mod 2^W) and that carry's bit 0 is zero.
module tb_csa_3to2;
  localparam int W = 8;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_3to2 #(.W(W)) dut (.a, .b, .c, .sum(s), .carry(cy));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i < 8) begin
        a = (i & 1) ? '1 : '0; b = (i & 2) ? '1 : '0; c = (i & 4) ? '1 : '0;
      end else begin
        a = W'($urandom); b = W'($urandom); c = W'($urandom);
      end
      #1;
      checks += 2;
      if (W'(a + b + c) != W'(s + cy)) begin
        failures++; $display("%h+%h+%h: %h+%h", a, b, c, s, cy);
      end
      if (cy[0] !== 1'b0) failures++;
      if (s != (a ^ b ^ c)) failures++;
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
