// tb_da_iir_single_rom: self-checking test of da_iir_single_rom (one table
// for all taps, 4:2 compressor): the default biquad at BCF = 1, 2, 4 and
// a fourth-order-recursion variant with full-scale coefficients.
module tb_da_iir_single_rom;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  int   c [NH], f [NH], st [NH], sa [NH], nf [NH];
  logic d [NH];

  tb_iir_harness #(.SINGLE(1), .BCF(2)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]),
    .n_stream(st[0]), .n_sat(sa[0]), .n_neg_fb(nf[0]), .done(d[0]));
  tb_iir_harness #(.SINGLE(1), .BCF(1)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]),
    .n_stream(st[1]), .n_sat(sa[1]), .n_neg_fb(nf[1]), .done(d[1]));
  tb_iir_harness #(.SINGLE(1), .BCF(4)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]),
    .n_stream(st[2]), .n_sat(sa[2]), .n_neg_fb(nf[2]), .done(d[2]));
  // extreme coefficients: every table word at full scale, output mostly clipped
  tb_iir_harness #(.SINGLE(1), .BCF(2), .K(2), .L(4),
    .A_COEFS({-16'sd32768, 16'sd32767}),
    .B_COEFS({-16'sd32768, 16'sd32767, -16'sd32768, -16'sd32768}))
    h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]),
    .n_stream(st[3]), .n_sat(sa[3]), .n_neg_fb(nf[3]), .done(d[3]));

  int checks, failures;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (5) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i]; failures += f[i];
      checks += 3;
      if (st[i] == 0) begin failures++; $display("harness %0d: no back-to-back samples", i); end
      if (sa[i] == 0) begin failures++; $display("harness %0d: quantiser never clipped", i); end
      if (nf[i] == 0) begin failures++; $display("harness %0d: no negative feedback sample", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
