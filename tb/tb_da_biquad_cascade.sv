// tb_da_biquad_cascade: self-checking test of da_biquad_cascade: the default
// two-section (fourth-order) low-pass at BCF = 2, a five-section (tenth-
// order) chain at BCF = 4 with different coefficients per section, and a
// single section at BCF = 1. Fails if a configuration never ran samples
// back to back, never started from idle, or never clipped.
module tb_da_biquad_cascade;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NH = 3;
  int   c [NH], f [NH], st [NH], id [NH], sa [NH];
  logic d [NH];

  tb_cascade_harness #(.BCF(2), .SECTIONS(2), .NSAMP(300)) h0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_stream(st[0]),
    .n_idle(id[0]), .n_sat(sa[0]), .done(d[0]));
  // tenth order: sections of differing gain, the third one with extreme values
  tb_cascade_harness #(.BCF(4), .SECTIONS(5),
    .A_COEFS({16'sd1105, 16'sd2210, 16'sd1105,
              16'sd4096, -16'sd8192, 16'sd4096,
              16'sd32767, -16'sd32768, 16'sd32767,
              16'sd2000, 16'sd6000, 16'sd2000,
              16'sd1105, 16'sd2210, 16'sd1105}),
    .B_COEFS({-16'sd6763, 16'sd18727,
              -16'sd4000, 16'sd10000,
              -16'sd32768, 16'sd32767,
              -16'sd8000, -16'sd12000,
              -16'sd6763, 16'sd18727}),
    .NSAMP(200)) h1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_stream(st[1]),
    .n_idle(id[1]), .n_sat(sa[1]), .done(d[1]));
  tb_cascade_harness #(.BCF(1), .SECTIONS(1), .NSAMP(150)) h2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_stream(st[2]),
    .n_idle(id[2]), .n_sat(sa[2]), .done(d[2]));

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
    wait (d[0] && d[1] && d[2]);
    repeat (5) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i]; failures += f[i];
      checks += 3;
      $display("harness %0d: %0d back-to-back, %0d from idle, %0d clipped", i, st[i], id[i], sa[i]);
      if (st[i] == 0) begin failures++; $display("harness %0d: no back-to-back samples", i); end
      if (id[i] == 0) begin failures++; $display("harness %0d: no sample from idle", i); end
      if (sa[i] == 0) begin failures++; $display("harness %0d: never clipped", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
