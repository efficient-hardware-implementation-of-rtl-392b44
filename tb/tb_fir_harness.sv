// tb_fir_harness: drives one da_fir instance with a random sample stream
// (random gaps, back-to-back bursts, extreme values) and compares every
// result with the exact integer sum sum_k A_k * x[n-k] worked out here.
// It also checks the timing: a result exactly G+1 clocks after its sample,
// and G clocks between samples taken back to back. Counts go out on ports.
module tb_fir_harness #(
  parameter int                N     = 16,
  parameter int                BCF   = 2,
  parameter int                K     = 3,
  parameter int                CW    = 16,
  parameter logic [K*CW-1:0]   COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  parameter int                NSAMP = 200,
  parameter int                SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stream,
  output int   n_neg_msb,
  output logic done
);
  localparam int G  = N / BCF;
  localparam int SW = N + CW + $clog2(K);

  logic [N-1:0]         x_in;
  logic                 x_valid, x_ready;
  logic signed [SW-1:0] y_out;
  logic                 y_valid;

  da_fir #(.N(N), .BCF(BCF), .K(K), .CW(CW), .COEFS(COEFS)) dut (
    .clk, .rst_n, .x_in, .x_valid, .x_ready, .y_out, .y_valid
  );

  longint hist [K];
  longint exp_q [$];
  longint due_q [$];
  longint cyc, last_load;
  int     sent, got;
  int     seed_state;

  function automatic logic [N-1:0] pick_x();
    int r;
    r = $urandom_range(0, 9);
    case (r)
      0: return {1'b1, {(N-1){1'b0}}};          // most negative
      1: return {1'b0, {(N-1){1'b1}}};          // most positive
      2: return '1;                              // -1
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; n_stream = 0; n_neg_msb = 0; done = 0;
    sent = 0; got = 0; cyc = 0; last_load = -100;
    x_valid = 0; x_in = '0;
    for (int k = 0; k < K; k++) hist[k] = 0;
    seed_state = $urandom(SEED);
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // stimulus: bursts of back-to-back samples and idle gaps
  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin
        // taken at this edge: update the reference
        longint acc;
        for (int k = K - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'($signed(x_in));
        if (x_in[N-1]) n_neg_msb++;
        acc = 0;
        for (int k = 0; k < K; k++) acc += hist[k] * longint'($signed(COEFS[k*CW +: CW]));
        exp_q.push_back(acc);
        due_q.push_back(cyc + longint'(G) + 2);  // y_valid rises G+1 edges after the load edge, seen one edge later
        if (last_load == cyc - longint'(G)) n_stream++;
        else if (sent > 0 && (cyc - last_load) < longint'(G)) begin
          failures++;
          $display("FIR BCF=%0d: samples %0d clocks apart", BCF, cyc - last_load);
        end
        last_load = cyc;
        sent++;
      end
      if (sent >= NSAMP) x_valid <= 1'b0;
      else if (!x_valid || x_ready) begin
        x_valid <= ($urandom_range(0, 3) != 0);
        x_in    <= pick_x();
      end
    end
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FIR BCF=%0d: unexpected output", BCF);
      end else begin
        longint e, d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (longint'(y_out) != e) begin
          failures++;
          $display("FIR BCF=%0d: out %0d got %0d exp %0d", BCF, got, y_out, e);
        end
        checks++;
        if (d != cyc) begin
          failures++;
          $display("FIR BCF=%0d: out %0d at clock %0d, expected %0d", BCF, got, cyc, d);
        end
      end
      got++;
      if (got == NSAMP) done <= 1'b1;
    end
  end
endmodule
