// da_biquad_cascade: a higher-order recursive filter built as a chain of
// SECTIONS second-order DA sections (da_iir, K = 3, L = 2). Two sections
// give a fourth-order low-pass with a 24 dB/octave roll-off; each added
// section adds two orders.
//
// How it works: the quantised output of section s is the input of section
// s+1. Every section is the same engine with G = N/BCF compute clocks and
// one write-back clock per sample, so when section s delivers its next
// result (at least G+1 clocks after the previous one), section s+1 has
// finished the previous sample and is idle or in its write-back clock,
// where it can take a new one. The chain therefore needs no buffer between
// sections and never drops a sample; an assertion checks this.
//
// Coefficients: section s uses A_COEFS[s*3*CW +: 3*CW] (a0 lowest) and
// B_COEFS[s*2*CW +: 2*CW] (b1 lowest), Q2.14 by default. The default is two
// copies of the second-order Butterworth low-pass at fs/10 (DC gain one).
//
// Interface and timing: a sample is taken on x_valid && x_ready, at most
// once every G+1 clocks. y_valid pulses SECTIONS*(G+1) + (SECTIONS-1)
// clocks after the sample was taken with y_q, the last section's quantised
// output, y_full, its exact sum, and y_sat, which is set if any section
// clipped its output for this sample. Cascading sections is the
// paper's suggestion for steeper filters; the chaining scheme is this
// design's own.
module da_biquad_cascade
  import da_pkg::*;
#(
  parameter int                       N        = 16,
  parameter int                       BCF      = 2,
  parameter int                       CW       = 16,
  parameter int                       CFRAC    = 14,
  parameter int                       SECTIONS = 2,
  parameter logic [SECTIONS*3*CW-1:0] A_COEFS  = {SECTIONS{16'sd1105, 16'sd2210, 16'sd1105}},
  parameter logic [SECTIONS*2*CW-1:0] B_COEFS  = {SECTIONS{-16'sd6763, 16'sd18727}},
  localparam int                      SW       = sum_width(N, CW, 5)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         x_in,
  input  logic                 x_valid,
  output logic                 x_ready,
  output logic signed [SW-1:0] y_full,
  output logic signed [N-1:0]  y_q,
  output logic                 y_sat,
  output logic                 y_valid
);
  // chain signals: index s is the input of section s, index SECTIONS the output
  logic [N-1:0]         c_x     [SECTIONS+1];
  logic                 c_valid [SECTIONS+1];
  logic                 c_clip  [SECTIONS+1];
  logic                 c_ready [SECTIONS];
  logic signed [SW-1:0] c_full  [SECTIONS];
  logic                 s_sat   [SECTIONS];

  assign c_x[0]     = x_in;
  assign c_valid[0] = x_valid;
  assign c_clip[0]  = 1'b0;
  assign x_ready    = c_ready[0];

  for (genvar s = 0; s < SECTIONS; s++) begin : g_sec
    logic signed [N-1:0] sq;
    // Clip flags of the samples inside this section, oldest in cf[0]. A
    // section holds at most two: one whose result is due and one just taken.
    logic [1:0]          cf;
    logic [1:0]          cf_n;
    logic                push, pop;

    da_iir #(
      .N(N), .BCF(BCF), .K(3), .L(2), .CW(CW), .CFRAC(CFRAC),
      .A_COEFS(A_COEFS[s*3*CW +: 3*CW]), .B_COEFS(B_COEFS[s*2*CW +: 2*CW])
    ) u_sec (
      .clk, .rst_n, .x_in(c_x[s]), .x_valid(c_valid[s]), .x_ready(c_ready[s]),
      .y_full(c_full[s]), .y_q(sq), .y_sat(s_sat[s]), .y_valid(c_valid[s+1])
    );

    assign push = c_valid[s] && c_ready[s];
    assign pop  = c_valid[s+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cf   <= '0;
        cf_n <= '0;
      end else begin
        case ({push, pop})
          2'b10: begin
            cf[cf_n[0]] <= c_clip[s];
            cf_n        <= cf_n + 2'd1;
          end
          2'b01: begin
            cf[0] <= cf[1];
            cf_n  <= cf_n - 2'd1;
          end
          2'b11: begin
            if (cf_n == 2'd2) begin
              cf[0] <= cf[1];
              cf[1] <= c_clip[s];
            end else begin
              cf[0] <= c_clip[s];
            end
          end
          default: ;
        endcase
      end
    end

    assign c_x[s+1]    = sq;
    assign c_clip[s+1] = cf[0] || s_sat[s];

    a_flags : assert property (@(posedge clk) disable iff (!rst_n)
      !(push && !pop && cf_n == 2'd2) && !(pop && cf_n == 2'd0))
      else $error("cascade section %0d: clip flag queue misused", s);

    if (s + 1 < SECTIONS) begin : g_chk
      a_next_ready : assert property (@(posedge clk) disable iff (!rst_n)
        c_valid[s+1] |-> c_ready[s+1])
        else $error("cascade section %0d not ready for its input", s + 1);
    end
  end

  assign y_full  = c_full[SECTIONS-1];
  assign y_q     = c_x[SECTIONS];
  assign y_sat   = c_clip[SECTIONS];
  assign y_valid = c_valid[SECTIONS];
endmodule
