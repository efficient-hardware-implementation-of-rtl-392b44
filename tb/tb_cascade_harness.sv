// tb_cascade_harness: drives one da_biquad_cascade with a random stream that
// includes full-scale steps, idle gaps and back-to-back bursts, and checks
// every output against a reference chain of biquads worked out here in
// integers. Section s computes
//   full_s[n] = a0 x_s[n] + a1 x_s[n-1] + a2 x_s[n-2] + b1 q_s[n-1] + b2 q_s[n-2]
//   q_s[n]    = clip(floor(full_s[n] / 2^CFRAC)),   x_{s+1}[n] = q_s[n],
// and y_sat is expected when any section clipped. Checks the latency
// (SECTIONS*(G+2)-1 clocks) and the spacing of back-to-back samples (G+1).
module tb_cascade_harness #(
  parameter int                       N        = 16,
  parameter int                       BCF      = 2,
  parameter int                       CW       = 16,
  parameter int                       CFRAC    = 14,
  parameter int                       SECTIONS = 2,
  parameter logic [SECTIONS*3*CW-1:0] A_COEFS  = {SECTIONS{16'sd1105, 16'sd2210, 16'sd1105}},
  parameter logic [SECTIONS*2*CW-1:0] B_COEFS  = {SECTIONS{-16'sd6763, 16'sd18727}},
  parameter int                       NSAMP    = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stream,
  output int   n_idle,
  output int   n_sat,
  output logic done
);
  localparam int G  = N / BCF;
  localparam int SW = N + CW + 3;

  logic [N-1:0]         x_in;
  logic                 x_valid, x_ready;
  logic signed [SW-1:0] y_full;
  logic signed [N-1:0]  y_q;
  logic                 y_sat, y_valid;

  da_biquad_cascade #(.N(N), .BCF(BCF), .CW(CW), .CFRAC(CFRAC), .SECTIONS(SECTIONS),
                      .A_COEFS(A_COEFS), .B_COEFS(B_COEFS)) dut (
    .clk, .rst_n, .x_in, .x_valid, .x_ready, .y_full, .y_q, .y_sat, .y_valid);

  longint xh [SECTIONS][3];
  longint yh [SECTIONS][2];
  longint exp_full [$], exp_q [$], due_q [$];
  bit     exp_sat [$];
  longint cyc, last_load, maxv, minv;
  int     sent, got, phase_left, mode, gap;

  function automatic longint coef_a(int s, int k);
    return longint'($signed(A_COEFS[(s*3 + k)*CW +: CW]));
  endfunction
  function automatic longint coef_b(int s, int l);
    return longint'($signed(B_COEFS[(s*2 + l)*CW +: CW]));
  endfunction

  function automatic logic [N-1:0] pick_x();
    case (mode)
      1: return {1'b0, {(N-1){1'b1}}};
      2: return {1'b1, {(N-1){1'b0}}};
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; n_stream = 0; n_idle = 0; n_sat = 0; done = 0;
    sent = 0; got = 0; cyc = 0; last_load = -100; mode = 0; phase_left = 10; gap = 0;
    x_valid = 0; x_in = '0;
    maxv = (64'sd1 <<< (N - 1)) - 1;
    minv = -(64'sd1 <<< (N - 1));
    for (int s = 0; s < SECTIONS; s++) begin
      for (int k = 0; k < 3; k++) xh[s][k] = 0;
      for (int l = 0; l < 2; l++) yh[s][l] = 0;
    end
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin
        longint v, acc;
        bit clip;
        v = longint'($signed(x_in));
        clip = 0;
        for (int s = 0; s < SECTIONS; s++) begin
          xh[s][2] = xh[s][1]; xh[s][1] = xh[s][0]; xh[s][0] = v;
          acc = 0;
          for (int k = 0; k < 3; k++) acc += coef_a(s, k) * xh[s][k];
          for (int l = 0; l < 2; l++) acc += coef_b(s, l) * yh[s][l];
          v = acc >>> CFRAC;
          if (v > maxv) begin v = maxv; clip = 1; end
          if (v < minv) begin v = minv; clip = 1; end
          yh[s][1] = yh[s][0]; yh[s][0] = v;
        end
        exp_full.push_back(acc);
        exp_q.push_back(v);
        exp_sat.push_back(clip);
        due_q.push_back(cyc + longint'(SECTIONS * (G + 2)));
        if (last_load == cyc - longint'(G + 1)) n_stream++;
        else if (sent > 0 && (cyc - last_load) < longint'(G + 1)) begin
          failures++;
          $display("cascade S=%0d: samples %0d clocks apart", SECTIONS, cyc - last_load);
        end else n_idle++;
        last_load = cyc;
        sent++;
        if (--phase_left == 0) begin
          mode = (mode == 1) ? 2 : (mode == 2 ? 0 : 1);
          phase_left = (mode == 0) ? 20 : 40;
        end
      end
      if (sent >= NSAMP) x_valid <= 1'b0;
      else if (gap > 0) begin
        gap--;
        x_valid <= 1'b0;
      end else if (!x_valid || x_ready) begin
        if ($urandom_range(0, 15) == 0) gap = $urandom_range(1, 3 * G);
        x_valid <= (gap == 0);
        x_in    <= pick_x();
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        checks++;
        $display("cascade S=%0d: unexpected output", SECTIONS);
      end else begin
        longint ef, eq, d;
        bit es;
        ef = exp_full.pop_front();
        eq = exp_q.pop_front();
        es = exp_sat.pop_front();
        d  = due_q.pop_front();
        checks += 4;
        if (longint'(y_full) != ef) begin
          failures++;
          $display("cascade S=%0d: out %0d full %0d exp %0d", SECTIONS, got, y_full, ef);
        end
        if (longint'(y_q) != eq) begin
          failures++;
          $display("cascade S=%0d: out %0d q %0d exp %0d", SECTIONS, got, y_q, eq);
        end
        if (y_sat != es) begin
          failures++;
          $display("cascade S=%0d: out %0d sat %0d exp %0d", SECTIONS, got, y_sat, es);
        end
        if (es) n_sat++;
        if (d != cyc) begin
          failures++;
          $display("cascade S=%0d: out %0d at clock %0d, expected %0d", SECTIONS, got, cyc, d);
        end
      end
      got++;
      if (got == NSAMP) done <= 1'b1;
    end
  end
endmodule
