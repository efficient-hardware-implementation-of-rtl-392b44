// tb_da_delay_line: random loads and shifts against a model that keeps the
// taps as integers; checks every register, every address group and every
// sign bit each clock, and that N/BCF shifts move a sample one tap on.
module tb_da_delay_line;
  localparam int TAPS = 3, N = 16, BCF = 2, G = N / BCF;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                load, shift;
  logic [N-1:0]        din;
  logic [TAPS*BCF-1:0] grp;
  logic [TAPS-1:0]     msb;
  logic [TAPS*N-1:0]   words;
  int checks = 0, failures = 0, n_moved = 0;

  da_delay_line #(.TAPS(TAPS), .N(N), .BCF(BCF)) dut (.clk, .rst_n, .load, .din, .shift, .grp, .msb, .words);

  // model: one long bit string, tap 0 at the top
  logic [TAPS*N-1:0] m;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    load = 0; shift = 0; din = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] sample;
      if (i % 100 == 0) begin
        // one full sample period: load, then G shifts; the sample must end in tap 1
        sample = N'($urandom);
        @(negedge clk); load = 1; shift = 0; din = sample;
        @(posedge clk); #1 m[TAPS*N-1 -: N] = sample;
        for (int g = 0; g < G; g++) begin
          @(negedge clk); load = 0; shift = 1;
          @(posedge clk); #1 m = m >> BCF;
        end
        checks++;
        if (words[N +: N] != sample) begin failures++; $display("sample did not move on"); end
        else n_moved++;
      end
      @(negedge clk);
      load  = ($urandom_range(0, 3) == 0);
      shift = ($urandom_range(0, 1) == 0);
      din   = N'($urandom);
      @(posedge clk);
      #1;
      if (shift) m = m >> BCF;
      if (load) m[TAPS*N-1 -: N] = din;
      for (int k = 0; k < TAPS; k++) begin
        logic [N-1:0] w;
        w = m[(TAPS-1-k)*N +: N];
        checks += 3;
        if (words[k*N +: N] != w) begin failures++; $display("tap %0d %h exp %h", k, words[k*N +: N], w); end
        if (grp[k*BCF +: BCF] != w[BCF-1:0]) failures++;
        if (msb[k] != w[BCF-1]) failures++;
      end
    end
    checks++;
    if (n_moved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
