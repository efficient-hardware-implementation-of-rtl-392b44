// tb_iir_harness: drives one recursive DA filter (da_iir, or
// da_iir_single_rom when SINGLE = 1) with a random stream that includes
// full-scale steps, and compares every output with a reference recursion
// worked out here in integers:
//   full[n] = sum_k a_k x[n-k] + sum_l b_l yq[n-l],
//   yq[n]   = clip(floor(full[n] / 2^CFRAC)) to N bits.
// Checks y_full, y_q and y_sat, the latency (G+1 clocks) and the spacing of
// back-to-back samples (G+1 clocks). Counts go out on ports.
module tb_iir_harness #(
  parameter int                N       = 16,
  parameter int                BCF     = 2,
  parameter int                K       = 3,
  parameter int                L       = 2,
  parameter int                CW      = 16,
  parameter int                CFRAC   = 14,
  parameter logic [K*CW-1:0]   A_COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  parameter logic [L*CW-1:0]   B_COEFS = {-16'sd6763, 16'sd18727},
  parameter bit                SINGLE  = 1'b0,
  parameter int                NSAMP   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stream,
  output int   n_sat,
  output int   n_neg_fb,
  output logic done
);
  localparam int G  = N / BCF;
  localparam int SW = N + CW + $clog2(K + L);

  logic [N-1:0]         x_in;
  logic                 x_valid, x_ready;
  logic signed [SW-1:0] y_full;
  logic signed [N-1:0]  y_q;
  logic                 y_sat, y_valid;

  if (SINGLE) begin : g_single
    da_iir_single_rom #(.N(N), .BCF(BCF), .K(K), .L(L), .CW(CW), .CFRAC(CFRAC),
                        .A_COEFS(A_COEFS), .B_COEFS(B_COEFS)) dut (
      .clk, .rst_n, .x_in, .x_valid, .x_ready, .y_full, .y_q, .y_sat, .y_valid);
  end else begin : g_two
    da_iir #(.N(N), .BCF(BCF), .K(K), .L(L), .CW(CW), .CFRAC(CFRAC),
             .A_COEFS(A_COEFS), .B_COEFS(B_COEFS)) dut (
      .clk, .rst_n, .x_in, .x_valid, .x_ready, .y_full, .y_q, .y_sat, .y_valid);
  end

  longint xh [K];
  longint yh [L];
  longint exp_full [$];
  longint exp_q [$];
  bit     exp_sat [$];
  longint due_q [$];
  longint cyc, last_load;
  int     sent, got, phase_left;
  int     mode;          // 0 random, 1 hold max, 2 hold min
  longint maxv, minv;

  function automatic logic [N-1:0] pick_x();
    case (mode)
      1: return {1'b0, {(N-1){1'b1}}};
      2: return {1'b1, {(N-1){1'b0}}};
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; n_stream = 0; n_sat = 0; n_neg_fb = 0; done = 0;
    sent = 0; got = 0; cyc = 0; last_load = -100; mode = 0; phase_left = 10;
    x_valid = 0; x_in = '0;
    maxv = (64'sd1 <<< (N - 1)) - 1;
    minv = -(64'sd1 <<< (N - 1));
    for (int k = 0; k < K; k++) xh[k] = 0;
    for (int l = 0; l < L; l++) yh[l] = 0;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin
        longint acc, q;
        bit s;
        for (int k = K - 1; k > 0; k--) xh[k] = xh[k-1];
        xh[0] = longint'($signed(x_in));
        acc = 0;
        for (int k = 0; k < K; k++) acc += xh[k] * longint'($signed(A_COEFS[k*CW +: CW]));
        for (int l = 0; l < L; l++) acc += yh[l] * longint'($signed(B_COEFS[l*CW +: CW]));
        for (int l = 0; l < L; l++) if (yh[l] < 0) begin n_neg_fb++; break; end
        q = acc >>> CFRAC;
        s = 0;
        if (q > maxv) begin q = maxv; s = 1; end
        if (q < minv) begin q = minv; s = 1; end
        for (int l = L - 1; l > 0; l--) yh[l] = yh[l-1];
        yh[0] = q;
        exp_full.push_back(acc);
        exp_q.push_back(q);
        exp_sat.push_back(s);
        due_q.push_back(cyc + longint'(G) + 2);  // y_valid rises G+1 edges after the load edge, seen one edge later
        if (last_load == cyc - longint'(G + 1)) n_stream++;
        else if (sent > 0 && (cyc - last_load) < longint'(G + 1)) begin
          failures++;
          $display("IIR BCF=%0d: samples %0d clocks apart", BCF, cyc - last_load);
        end
        last_load = cyc;
        sent++;
        if (--phase_left == 0) begin
          mode = (mode == 1) ? 2 : (mode == 2 ? 0 : 1);
          phase_left = (mode == 0) ? 20 : 15;
        end
      end
      if (sent >= NSAMP) x_valid <= 1'b0;
      else if (!x_valid || x_ready) begin
        x_valid <= ($urandom_range(0, 3) != 0);
        x_in    <= pick_x();
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        checks++;
        $display("IIR BCF=%0d: unexpected output", BCF);
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
          $display("IIR BCF=%0d single=%0d: out %0d full %0d exp %0d", BCF, SINGLE, got, y_full, ef);
        end
        if (longint'(y_q) != eq) begin
          failures++;
          $display("IIR BCF=%0d single=%0d: out %0d q %0d exp %0d", BCF, SINGLE, got, y_q, eq);
        end
        if (y_sat != es) begin
          failures++;
          $display("IIR BCF=%0d: out %0d sat %0d exp %0d", BCF, got, y_sat, es);
        end
        if (es) n_sat++;
        if (d != cyc) begin
          failures++;
          $display("IIR BCF=%0d: out %0d at clock %0d, expected %0d", BCF, got, cyc, d);
        end
      end
      got++;
      if (got == NSAMP) done <= 1'b1;
    end
  end
endmodule
