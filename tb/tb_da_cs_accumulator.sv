// tb_da_cs_accumulator: drives random carry-save pairs with random clear,
// enable and capture strobes and compares the fed-back vectors (register
// shifted right by BCF), the CPA sum of the captured pair and the output
// register (one clock after capture) with a model.
module tb_da_cs_accumulator;
  localparam int W = 40, BCF = 2, YW = 34;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         acc_clr, en, cap, y_valid;
  logic [W-1:0] sum_in, carry_in, fb_sum, fb_carry;
  logic signed [W-1:0]  cpa_sum;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0, n_out = 0;

  da_cs_accumulator #(.W(W), .BCF(BCF), .YW(YW)) dut (.clk, .rst_n, .acc_clr, .en, .cap,
    .sum_in, .carry_in, .fb_sum, .fb_carry, .cpa_sum, .y, .y_valid);

  longint ms, mc, cs, cc, my;
  bit     mcap_d, mvalid;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    acc_clr = 0; en = 0; cap = 0; sum_in = '0; carry_in = '0;
    ms = 0; mc = 0; cs = 0; cc = 0; my = 0; mcap_d = 0; mvalid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      longint si, ci;
      @(negedge clk);
      acc_clr = ($urandom_range(0, 7) == 0);
      en      = ($urandom_range(0, 3) != 0);
      cap     = ($urandom_range(0, 5) == 0);
      si = longint'($signed(30'($urandom)));
      ci = longint'($signed(30'($urandom)));
      sum_in = W'(si); carry_in = W'(ci);
      #1;
      checks += 3;
      if (longint'($signed(fb_sum)) != (ms >>> BCF))   begin failures++; $display("fb_sum"); end
      if (longint'($signed(fb_carry)) != (mc >>> BCF)) begin failures++; $display("fb_carry"); end
      if (longint'(cpa_sum) != cs + cc)                begin failures++; $display("cpa"); end
      checks += 2;
      if (y_valid != mvalid) begin failures++; $display("y_valid"); end
      if (longint'(y) != my) begin failures++; $display("y %0d exp %0d", y, my); end
      if (y_valid) n_out++;
      // model update at the coming edge
      mvalid = mcap_d;
      if (mcap_d) my = cs + cc;
      mcap_d = cap;
      if (cap) begin cs = si; cc = ci; end
      if (acc_clr) begin ms = 0; mc = 0; end
      else if (en) begin ms = si; mc = ci; end
    end
    checks++;
    if (n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
