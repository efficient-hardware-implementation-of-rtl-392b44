// da_iir: recursive (IIR) filter by distributed arithmetic with separate
// tables for the feed-forward and the feedback path (the proposed IIR
// architecture; with K = 3, L = 2 it is the biquad of the application).
//
//   y[n] = sum_{k=0}^{K-1} A_k * x[n-k] + sum_{l=1}^{L} B_l * yq[n-l]
//
// A_k at A_COEFS[k*CW +: CW], B_l at B_COEFS[(l-1)*CW +: CW], CW-bit signed
// with CFRAC fractional bits; samples N-bit two's complement. yq is the
// output quantised to N bits (da_quantizer: drop CFRAC bits, saturate).
// Defaults: Q1.15 samples, BCF = 2, Q2.14 coefficients of a second-order
// Butterworth low-pass at fs/10 (a0 = a2 = 1105, a1 = 2210, b1 = 18727,
// b2 = -6763), whose DC gain is exactly one.
//
// How it works: two delay lines (x taps, and the L past outputs) shift BCF
// bits per clock. Each addresses its own look-up table and MSB-correction
// table; a 6:2 carry-save compressor adds the two table words, the two
// (multiplexed) correction words and the fed-back accumulator pair. After
// G = N/BCF clocks the pair is captured; in the following write-back clock
// the CPA adds it, the quantiser turns it into yq[n], which is loaded into
// the first register of the feedback delay line, and the outputs update.
//
// Interface and timing: a sample is taken when x_valid && x_ready, at most
// once every G+1 clocks. y_valid pulses with y_full (exact sum, SW bits),
// y_q (= yq[n]) and y_sat (y_q was clipped) G+1 clocks after the sample was
// taken. The table/compressor architecture is the paper's; the write-back
// clock, the quantiser rule, the coefficients and all widths are this
// design's.
module da_iir
  import da_pkg::*;
#(
  parameter int                N       = 16,
  parameter int                BCF     = 2,
  parameter int                K       = 3,
  parameter int                L       = 2,
  parameter int                CW      = 16,
  parameter int                CFRAC   = 14,
  parameter logic [K*CW-1:0]   A_COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  parameter logic [L*CW-1:0]   B_COEFS = {-16'sd6763, 16'sd18727},
  localparam int               SW      = sum_width(N, CW, K + L)
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
  localparam int G  = N / BCF;
  localparam int RX = rom_width(COEF_BITS_MAX'(A_COEFS), K, CW, BCF);
  localparam int RY = rom_width(COEF_BITS_MAX'(B_COEFS), L, CW, BCF);
  // the accumulator is sized for the table words of all K+L coefficients
  localparam int RA = rom_width(COEF_BITS_MAX'({B_COEFS, A_COEFS}), K + L, CW, BCF);
  localparam int W  = acc_width(N, BCF, RA);

  if (N % BCF != 0) begin : g_bad_bcf
    $error("BCF must divide N");
  end

  logic load, shift, acc_clr, msb_sel, cap, wb;
  logic [K*BCF-1:0] xgrp;
  logic [K-1:0]     xmsb;
  logic [L*BCF-1:0] ygrp;
  logic [L-1:0]     ymsb;
  logic [RX-1:0]    xlut_w, xmsb_w;
  logic [RY-1:0]    ylut_w, ymsb_w;
  logic [W-1:0]     xlut_t, xmsb_t, ylut_t, ymsb_t;
  logic [W-1:0]     fb_sum, fb_carry, c_sum, c_carry;
  logic signed [W-1:0] cpa_sum;
  logic signed [N-1:0] yq_next;
  logic                sat_next;

  da_controller #(.G(G), .FEEDBACK(1'b1)) u_ctrl (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .load, .shift,
    .acc_clr, .msb_sel, .cap, .wb, .busy()
  );

  // Feed-forward path.
  da_delay_line #(.TAPS(K), .N(N), .BCF(BCF)) u_xline (
    .clk, .rst_n, .load, .din(x_in), .shift,
    .grp(xgrp), .msb(xmsb), .words()
  );
  da_lut_rom #(.TAPS(K), .BCF(BCF), .CW(CW), .R(RX), .COEFS(A_COEFS)) u_xlut (
    .addr(xgrp), .data(xlut_w)
  );
  da_msb_rom #(.TAPS(K), .BCF(BCF), .CW(CW), .R(RX), .COEFS(A_COEFS)) u_xmsb (
    .addr(xmsb), .data(xmsb_w)
  );

  // Feedback path: register 0 holds yq[n-1] while y[n] is computed.
  da_delay_line #(.TAPS(L), .N(N), .BCF(BCF)) u_yline (
    .clk, .rst_n, .load(wb), .din(yq_next), .shift,
    .grp(ygrp), .msb(ymsb), .words()
  );
  da_lut_rom #(.TAPS(L), .BCF(BCF), .CW(CW), .R(RY), .COEFS(B_COEFS)) u_ylut (
    .addr(ygrp), .data(ylut_w)
  );
  da_msb_rom #(.TAPS(L), .BCF(BCF), .CW(CW), .R(RY), .COEFS(B_COEFS)) u_ymsb (
    .addr(ymsb), .data(ymsb_w)
  );

  always_comb begin
    xlut_t = W'($signed(xlut_w)) << (N - BCF);
    ylut_t = W'($signed(ylut_w)) << (N - BCF);
    xmsb_t = msb_sel ? (W'($signed(xmsb_w)) << (N - BCF)) : '0;
    ymsb_t = msb_sel ? (W'($signed(ymsb_w)) << (N - BCF)) : '0;
  end

  compressor_6to2 #(.W(W)) u_comp (
    .in0(xlut_t), .in1(xmsb_t), .in2(ylut_t), .in3(ymsb_t),
    .in4(fb_sum), .in5(fb_carry), .sum(c_sum), .carry(c_carry)
  );

  da_cs_accumulator #(.W(W), .BCF(BCF), .YW(SW)) u_acc (
    .clk, .rst_n, .acc_clr, .en(shift), .cap,
    .sum_in(c_sum), .carry_in(c_carry), .fb_sum, .fb_carry,
    .cpa_sum, .y(y_full), .y_valid
  );

  da_quantizer #(.W(W), .N(N), .FRAC(CFRAC)) u_q (
    .din(cpa_sum), .dout(yq_next), .sat(sat_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q   <= '0;
      y_sat <= 1'b0;
    end else if (wb) begin
      y_q   <= yq_next;
      y_sat <= sat_next;
    end
  end
endmodule
