// tb_da_filter_top: end-to-end test of da_filter_top at its default sizes
// (Q1.15, BCF = 2, the default biquad). One stimulus stream (random
// samples, full-scale steps, idle gaps and back-to-back bursts) goes to both
// biquad organisations and to the two-section cascade, which run in lock
// step; a second stream goes to the FIR. Every output is compared with
// integer reference models worked out here, both biquads are compared with each other, and the latency and
// sample spacing are checked (FIR: 8 clocks per sample; biquads: 9; cascade
// latency 19).
// It counts how often each mechanism happened and fails if one never did:
// back-to-back samples, a sample taken from idle, negative samples (MSB
// table in use), negative fed-back outputs, quantiser saturation, and
// clipped cascade outputs.
module tb_da_filter_top;
  localparam int N = 16, G = 8, CW = 16, CFRAC = 14;
  localparam int NSAMP = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]        bq_x_in, fir_x_in;
  logic                bq_x_valid, fir_x_valid;
  logic                bq_x_ready, sq_x_ready, fir_x_ready;
  logic signed [34:0]  bq_y_full, sq_y_full;
  logic signed [33:0]  fir_y_out;
  logic signed [N-1:0] bq_y_q, sq_y_q;
  logic                bq_y_sat, sq_y_sat, bq_y_valid, sq_y_valid, fir_y_valid;
  logic                casc_x_ready, casc_y_sat, casc_y_valid;
  logic signed [34:0]  casc_y_full;
  logic signed [N-1:0] casc_y_q;

  da_filter_top dut (
    .clk, .rst_n,
    .bq_x_in, .bq_x_valid, .bq_x_ready, .bq_y_full, .bq_y_q, .bq_y_sat, .bq_y_valid,
    .sq_x_in(bq_x_in), .sq_x_valid(bq_x_valid), .sq_x_ready, .sq_y_full, .sq_y_q,
    .sq_y_sat, .sq_y_valid,
    .fir_x_in, .fir_x_valid, .fir_x_ready, .fir_y_out, .fir_y_valid,
    .casc_x_in(bq_x_in), .casc_x_valid(bq_x_valid), .casc_x_ready, .casc_y_full,
    .casc_y_q, .casc_y_sat, .casc_y_valid
  );

  // coefficients of the default biquad, written out independently of the RTL
  longint a [3] = '{1105, 2210, 1105};
  longint b [2] = '{18727, -6763};

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // mechanism counters
  int n_bq_stream = 0, n_bq_idle = 0, n_fir_stream = 0, n_fir_idle = 0;
  int n_neg_x = 0, n_neg_fb = 0, n_sat = 0, n_casc_sat = 0;

  // ---------------- biquad stream and reference ----------------
  longint xh [3], yh [2];
  longint e_full [$], e_q [$], e_due [$];
  bit     e_sat [$];
  longint bq_last = -100;
  int     bq_sent = 0, bq_got = 0, mode = 0, left = 30, bq_gap = 0;
  // second cascade section (the first one is the biquad above)
  longint ch [3], cy [2];
  longint c_full [$], c_q [$], c_due [$];
  bit     c_sat [$];
  int     casc_got = 0;

  function automatic logic [N-1:0] bq_pick();
    case (mode)
      1: return 16'h7fff;
      2: return 16'h8000;
      default: return N'($urandom);
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (bq_x_valid && bq_x_ready) begin
        longint acc, q;
        bit s;
        if (!sq_x_ready || !casc_x_ready) begin failures++; $display("biquads out of step"); end
        xh[2] = xh[1]; xh[1] = xh[0]; xh[0] = longint'($signed(bq_x_in));
        if (xh[0] < 0) n_neg_x++;
        if (yh[0] < 0 || yh[1] < 0) n_neg_fb++;
        acc = a[0]*xh[0] + a[1]*xh[1] + a[2]*xh[2] + b[0]*yh[0] + b[1]*yh[1];
        q = acc >>> CFRAC; s = 0;
        if (q > 32767)  begin q = 32767;  s = 1; end
        if (q < -32768) begin q = -32768; s = 1; end
        yh[1] = yh[0]; yh[0] = q;
        begin : second_section
          longint acc2, q2;
          ch[2] = ch[1]; ch[1] = ch[0]; ch[0] = q;
          acc2 = a[0]*ch[0] + a[1]*ch[1] + a[2]*ch[2] + b[0]*cy[0] + b[1]*cy[1];
          q2 = acc2 >>> CFRAC;
          if (q2 > 32767)  q2 = 32767;
          if (q2 < -32768) q2 = -32768;
          cy[1] = cy[0]; cy[0] = q2;
          c_full.push_back(acc2); c_q.push_back(q2);
          c_sat.push_back(s || (q2 != (acc2 >>> CFRAC)));
          c_due.push_back(cyc + 2 * (G + 2));
        end
        e_full.push_back(acc); e_q.push_back(q); e_sat.push_back(s);
        e_due.push_back(cyc + G + 2);
        if (bq_last == cyc - (G + 1)) n_bq_stream++;
        else if (bq_sent > 0 && cyc - bq_last < G + 1) begin
          failures++; $display("biquad samples too close");
        end else n_bq_idle++;
        bq_last = cyc;
        bq_sent++;
        if (--left == 0) begin
          mode = (mode == 1) ? 2 : (mode == 2 ? 0 : 1);
          left = (mode == 0) ? 40 : 30;
        end
      end
      if (bq_sent >= NSAMP) bq_x_valid <= 1'b0;
      else if (bq_gap > 0) begin
        bq_gap--;
        bq_x_valid <= 1'b0;
      end else if (!bq_x_valid || bq_x_ready) begin
        // long bursts, occasional idle stretches
        if ($urandom_range(0, 19) == 0) bq_gap = $urandom_range(5, 30);
        bq_x_valid <= (bq_gap == 0);
        bq_x_in    <= bq_pick();
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && (bq_y_valid || sq_y_valid)) begin
      checks += 2;
      if (bq_y_valid != sq_y_valid) begin failures++; $display("biquad outputs out of step"); end
      if (bq_y_full != sq_y_full || bq_y_q != sq_y_q || bq_y_sat != sq_y_sat) begin
        failures++; $display("biquad organisations disagree at output %0d", bq_got);
      end
      if (e_q.size() == 0) begin
        failures++; $display("unexpected biquad output");
      end else begin
        longint f, q, d;
        bit s;
        f = e_full.pop_front(); q = e_q.pop_front(); s = e_sat.pop_front(); d = e_due.pop_front();
        checks += 4;
        if (longint'(bq_y_full) != f) begin failures++; $display("bq %0d full %0d exp %0d", bq_got, bq_y_full, f); end
        if (longint'(bq_y_q) != q)    begin failures++; $display("bq %0d q %0d exp %0d", bq_got, bq_y_q, q); end
        if (bq_y_sat != s)            begin failures++; $display("bq %0d sat mismatch", bq_got); end
        if (d != cyc)                 begin failures++; $display("bq %0d late/early", bq_got); end
        if (s) n_sat++;
      end
      bq_got++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && casc_y_valid) begin
      if (c_q.size() == 0) begin
        checks++; failures++; $display("unexpected cascade output");
      end else begin
        longint f, q, d;
        bit s;
        f = c_full.pop_front(); q = c_q.pop_front(); s = c_sat.pop_front(); d = c_due.pop_front();
        checks += 4;
        if (longint'(casc_y_full) != f) begin failures++; $display("casc %0d full %0d exp %0d", casc_got, casc_y_full, f); end
        if (longint'(casc_y_q) != q)    begin failures++; $display("casc %0d q %0d exp %0d", casc_got, casc_y_q, q); end
        if (casc_y_sat != s)            begin failures++; $display("casc %0d sat mismatch", casc_got); end
        if (d != cyc)                   begin failures++; $display("casc %0d late/early", casc_got); end
        if (s) n_casc_sat++;
      end
      casc_got++;
    end
  end

  // ---------------- FIR stream and reference ----------------
  longint fh [3];
  longint f_exp [$], f_due [$];
  longint fir_last = -100;
  int     fir_sent = 0, fir_got = 0, fir_gap = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (fir_x_valid && fir_x_ready) begin
        fh[2] = fh[1]; fh[1] = fh[0]; fh[0] = longint'($signed(fir_x_in));
        f_exp.push_back(a[0]*fh[0] + a[1]*fh[1] + a[2]*fh[2]);
        f_due.push_back(cyc + G + 2);
        if (fir_last == cyc - G) n_fir_stream++;
        else if (fir_sent > 0 && cyc - fir_last < G) begin
          failures++; $display("FIR samples too close");
        end else n_fir_idle++;
        fir_last = cyc;
        fir_sent++;
      end
      if (fir_sent >= NSAMP) fir_x_valid <= 1'b0;
      else if (fir_gap > 0) begin
        fir_gap--;
        fir_x_valid <= 1'b0;
      end else if (!fir_x_valid || fir_x_ready) begin
        if ($urandom_range(0, 9) == 0) fir_gap = $urandom_range(3, 20);
        fir_x_valid <= (fir_gap == 0);
        fir_x_in    <= N'($urandom);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && fir_y_valid) begin
      if (f_exp.size() == 0) begin
        checks++; failures++; $display("unexpected FIR output");
      end else begin
        longint e, d;
        e = f_exp.pop_front(); d = f_due.pop_front();
        checks += 2;
        if (longint'(fir_y_out) != e) begin failures++; $display("fir %0d got %0d exp %0d", fir_got, fir_y_out, e); end
        if (d != cyc) begin failures++; $display("fir %0d late/early", fir_got); end
      end
      fir_got++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("%-32s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin xh[i] = 0; fh[i] = 0; end
    for (int i = 0; i < 3; i++) ch[i] = 0;
    for (int i = 0; i < 2; i++) begin yh[i] = 0; cy[i] = 0; end
    bq_x_valid = 0; fir_x_valid = 0; bq_x_in = '0; fir_x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (bq_got == NSAMP && fir_got == NSAMP && casc_got == NSAMP);
    repeat (20) @(posedge clk);
    need("biquad back-to-back samples", n_bq_stream);
    need("biquad samples from idle", n_bq_idle);
    need("FIR back-to-back samples", n_fir_stream);
    need("FIR samples from idle", n_fir_idle);
    need("negative samples (MSB table)", n_neg_x);
    need("negative fed-back outputs", n_neg_fb);
    need("quantiser saturation", n_sat);
    need("cascade clipped samples", n_casc_sat);
    checks++;
    if (e_q.size() != 0 || f_exp.size() != 0 || c_q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
