// tb_da_fir: self-checking test of da_fir at several bits-combination
// factors and tap counts, including full-scale negative coefficients that
// stress the carry-save guard bits.
module tb_da_fir;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  int   c [NH], f [NH], st [NH], ng [NH];
  logic d [NH];

  tb_fir_harness #(.BCF(2)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]),
    .n_stream(st[0]), .n_neg_msb(ng[0]), .done(d[0]));
  tb_fir_harness #(.BCF(1), .K(4), .COEFS({-16'sd32768, 16'sd32767, -16'sd1, 16'sd12345}))
    h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_stream(st[1]), .n_neg_msb(ng[1]), .done(d[1]));
  tb_fir_harness #(.BCF(4), .K(3), .COEFS({-16'sd32768, -16'sd32768, -16'sd32768}))
    h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_stream(st[2]), .n_neg_msb(ng[2]), .done(d[2]));
  tb_fir_harness #(.BCF(8), .K(1), .COEFS({16'sd32767}))
    h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .n_stream(st[3]), .n_neg_msb(ng[3]), .done(d[3]));

  int checks, failures;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (5) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i]; failures += f[i];
      checks++;
      if (st[i] == 0) begin failures++; $display("harness %0d: no back-to-back samples", i); end
      checks++;
      if (ng[i] == 0) begin failures++; $display("harness %0d: no negative samples", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
