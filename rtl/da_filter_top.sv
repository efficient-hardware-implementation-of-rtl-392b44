// da_filter_top: the distributed-arithmetic filter engines side by side,
// each with its own ports, all at their default sizes (Q1.15 samples,
// BCF = 2, Q2.14 coefficients of one second-order low-pass section):
//
//   bq_*  : biquad with separate feed-forward and feedback tables and a 6:2
//           compressor (da_iir, K = 3, L = 2), the main configuration;
//   sq_*  : the same biquad with one shared table and a 4:2 compressor
//           (da_iir_single_rom);
//   fir_* : the 3-tap FIR made of the biquad's feed-forward coefficients
//           (da_fir), the FIR form of the architecture;
//   casc_*: two such biquad sections in cascade, a fourth-order low-pass
//           (da_biquad_cascade).
//
// Each engine takes a sample on *_x_valid && *_x_ready and pulses *_y_valid
// with the result: every 8 clocks for the FIR, every 9 for the recursive
// engines (one write-back clock), result 9 clocks after the sample (19 for
// the two-section cascade).
// Sharing nothing between the engines is this design's choice.
module da_filter_top
  import da_pkg::*;
#(
  parameter int N     = 16,
  parameter int BCF   = 2,
  parameter int CW    = 16,
  parameter int CFRAC = 14,
  localparam int SW_IIR = sum_width(N, CW, 5),
  localparam int SW_FIR = sum_width(N, CW, 3)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // biquad, two-table organisation
  input  logic [N-1:0]             bq_x_in,
  input  logic                     bq_x_valid,
  output logic                     bq_x_ready,
  output logic signed [SW_IIR-1:0] bq_y_full,
  output logic signed [N-1:0]      bq_y_q,
  output logic                     bq_y_sat,
  output logic                     bq_y_valid,
  // biquad, single-table organisation
  input  logic [N-1:0]             sq_x_in,
  input  logic                     sq_x_valid,
  output logic                     sq_x_ready,
  output logic signed [SW_IIR-1:0] sq_y_full,
  output logic signed [N-1:0]      sq_y_q,
  output logic                     sq_y_sat,
  output logic                     sq_y_valid,
  // FIR
  input  logic [N-1:0]             fir_x_in,
  input  logic                     fir_x_valid,
  output logic                     fir_x_ready,
  output logic signed [SW_FIR-1:0] fir_y_out,
  output logic                     fir_y_valid,
  // fourth-order cascade of two biquad sections
  input  logic [N-1:0]             casc_x_in,
  input  logic                     casc_x_valid,
  output logic                     casc_x_ready,
  output logic signed [SW_IIR-1:0] casc_y_full,
  output logic signed [N-1:0]      casc_y_q,
  output logic                     casc_y_sat,
  output logic                     casc_y_valid
);
  localparam logic [3*CW-1:0] A_COEFS = {16'sd1105, 16'sd2210, 16'sd1105};
  localparam logic [2*CW-1:0] B_COEFS = {-16'sd6763, 16'sd18727};

  da_iir #(
    .N(N), .BCF(BCF), .K(3), .L(2), .CW(CW), .CFRAC(CFRAC),
    .A_COEFS(A_COEFS), .B_COEFS(B_COEFS)
  ) u_biquad (
    .clk, .rst_n, .x_in(bq_x_in), .x_valid(bq_x_valid), .x_ready(bq_x_ready),
    .y_full(bq_y_full), .y_q(bq_y_q), .y_sat(bq_y_sat), .y_valid(bq_y_valid)
  );

  da_iir_single_rom #(
    .N(N), .BCF(BCF), .K(3), .L(2), .CW(CW), .CFRAC(CFRAC),
    .A_COEFS(A_COEFS), .B_COEFS(B_COEFS)
  ) u_biquad_single (
    .clk, .rst_n, .x_in(sq_x_in), .x_valid(sq_x_valid), .x_ready(sq_x_ready),
    .y_full(sq_y_full), .y_q(sq_y_q), .y_sat(sq_y_sat), .y_valid(sq_y_valid)
  );

  da_fir #(
    .N(N), .BCF(BCF), .K(3), .CW(CW), .COEFS(A_COEFS)
  ) u_fir (
    .clk, .rst_n, .x_in(fir_x_in), .x_valid(fir_x_valid), .x_ready(fir_x_ready),
    .y_out(fir_y_out), .y_valid(fir_y_valid)
  );

  da_biquad_cascade #(
    .N(N), .BCF(BCF), .CW(CW), .CFRAC(CFRAC), .SECTIONS(2),
    .A_COEFS({2{A_COEFS}}), .B_COEFS({2{B_COEFS}})
  ) u_cascade (
    .clk, .rst_n, .x_in(casc_x_in), .x_valid(casc_x_valid), .x_ready(casc_x_ready),
    .y_full(casc_y_full), .y_q(casc_y_q), .y_sat(casc_y_sat), .y_valid(casc_y_valid)
  );
endmodule
