// tb_throughput_configs: runs the engines in the buildable sample-format /
// bits-combination-factor configurations of the throughput comparison:
// Q1.15 with BCF = 4 (4 clocks per FIR sample) and Q2.22 (N = 24) with
// BCF = 8 (3 clocks per FIR sample, a 2^24-word feed-forward table).
// The recursive engines take one write-back clock more per sample.
// Each harness checks every result against an integer reference model, the
// latency and the spacing of back-to-back samples; this bench also
// fails if a configuration never ran back to back at its full rate.
module tb_throughput_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  int   c [NH], f [NH], st [NH], x1 [NH], x2 [NH];
  logic d [NH];

  tb_fir_harness #(.N(16), .BCF(4), .NSAMP(150)) h0 (.clk, .rst_n, .checks(c[0]),
    .failures(f[0]), .n_stream(st[0]), .n_neg_msb(x1[0]), .done(d[0]));
  tb_iir_harness #(.N(16), .BCF(4), .NSAMP(150)) h1 (.clk, .rst_n, .checks(c[1]),
    .failures(f[1]), .n_stream(st[1]), .n_sat(x1[1]), .n_neg_fb(x2[1]), .done(d[1]));
  tb_fir_harness #(.N(24), .BCF(8), .NSAMP(150)) h2 (.clk, .rst_n, .checks(c[2]),
    .failures(f[2]), .n_stream(st[2]), .n_neg_msb(x1[2]), .done(d[2]));
  tb_iir_harness #(.N(24), .BCF(8), .CFRAC(14), .NSAMP(150)) h3 (.clk, .rst_n, .checks(c[3]),
    .failures(f[3]), .n_stream(st[3]), .n_sat(x1[3]), .n_neg_fb(x2[3]), .done(d[3]));

  int checks, failures;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (5) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i] + 1; failures += f[i];
      $display("config %0d: %0d back-to-back samples", i, st[i]);
      if (st[i] == 0) begin failures++; $display("config %0d never ran at full rate", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
