// tb_da_controller: random in_valid into a FIR-mode (G = 8) and an IIR-mode
// (G = 5) sequencer; every clock their outputs are compared with a model
// that tracks the phase of the sample (idle, compute clock 0..G-1, write-back).
module tb_da_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic v0, v1;
  logic r0, ld0, sh0, clr0, ms0, cap0, wb0, b0;
  logic r1, ld1, sh1, clr1, ms1, cap1, wb1, b1;
  int   n_loads0 = 0, n_loads1 = 0, n_wb = 0, n_b2b0 = 0;

  da_controller #(.G(8), .FEEDBACK(1'b0)) dut0 (.clk, .rst_n, .in_valid(v0), .in_ready(r0),
    .load(ld0), .shift(sh0), .acc_clr(clr0), .msb_sel(ms0), .cap(cap0), .wb(wb0), .busy(b0));
  da_controller #(.G(5), .FEEDBACK(1'b1)) dut1 (.clk, .rst_n, .in_valid(v1), .in_ready(r1),
    .load(ld1), .shift(sh1), .acc_clr(clr1), .msb_sel(ms1), .cap(cap1), .wb(wb1), .busy(b1));

  // phase: -1 idle, 0..G-1 compute, G write-back (IIR only)
  int p0 = -1, p1 = -1;

  task automatic cmp(input string n, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s got %0d exp %0d (p0=%0d p1=%0d)", n, got, exp, p0, p1); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    v0 = 0; v1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic e_r0, e_r1;
      @(negedge clk);
      v0 = (i % 200 < 100) ? 1'b1 : ($urandom_range(0, 4) == 0);
      v1 = (i % 300 < 150) ? 1'b1 : ($urandom_range(0, 4) == 0);
      #1;
      // FIR mode
      e_r0 = (p0 == -1) || (p0 == 7);
      cmp("r0", r0, e_r0);
      cmp("ld0", ld0, e_r0 && v0);
      cmp("sh0", sh0, p0 >= 0);
      cmp("clr0", clr0, e_r0 && v0);
      cmp("ms0", ms0, p0 == 7);
      cmp("cap0", cap0, p0 == 7);
      cmp("wb0", wb0, 1'b0);
      cmp("b0", b0, p0 != -1);
      // IIR mode
      e_r1 = (p1 == -1) || (p1 == 5);
      cmp("r1", r1, e_r1);
      cmp("ld1", ld1, e_r1 && v1);
      cmp("sh1", sh1, p1 >= 0 && p1 < 5);
      cmp("ms1", ms1, p1 == 4);
      cmp("cap1", cap1, p1 == 4);
      cmp("wb1", wb1, p1 == 5);
      cmp("b1", b1, p1 != -1);
      // advance the model
      if (e_r0 && v0) begin n_loads0++; if (p0 == 7) n_b2b0++; p0 = 0; end
      else if (p0 >= 0) p0 = (p0 == 7) ? -1 : p0 + 1;
      if (p1 == 5) n_wb++;
      if (e_r1 && v1) begin n_loads1++; p1 = 0; end
      else if (p1 >= 0) p1 = (p1 == 5) ? -1 : p1 + 1;
    end
    checks += 3;
    if (n_loads0 == 0 || n_loads1 == 0) failures++;
    if (n_wb == 0) failures++;
    if (n_b2b0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
