// da_iir_single_rom: recursive (IIR) filter by distributed arithmetic with
// one look-up table shared by the feed-forward and the feedback taps (the
// proposed single-memory IIR architecture).
//
//   y[n] = sum_{k=0}^{K-1} A_k * x[n-k] + sum_{l=1}^{L} B_l * yq[n-l]
//
// Same function, coefficients, quantiser and interface as da_iir. The
// difference is the memory organisation: the BCF-bit groups of all K+L taps
// form one address into a single table of 2^((K+L)*BCF) words, and the K+L
// sign bits one address into a single MSB-correction table, so a 4:2
// compressor suffices. This trades a much deeper table for a smaller adder.
//
// Interface and timing: as da_iir (G+1 clocks per sample, y_valid G+1 clocks
// after a sample is taken). The organisation is the paper's; the
// write-back clock, the quantiser rule, the coefficients and the widths are
// this design's.
module da_iir_single_rom
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
  localparam int G = N / BCF;
  localparam int T = K + L;
  // Table taps 0..K-1 are the x taps, K..K+L-1 the past outputs.
  localparam logic [T*CW-1:0] COEFS = {B_COEFS, A_COEFS};
  localparam int R = rom_width(COEF_BITS_MAX'(COEFS), T, CW, BCF);
  localparam int W = acc_width(N, BCF, R);

  if (N % BCF != 0) begin : g_bad_bcf
    $error("BCF must divide N");
  end

  logic load, shift, acc_clr, msb_sel, cap, wb;
  logic [K*BCF-1:0] xgrp;
  logic [K-1:0]     xmsb;
  logic [L*BCF-1:0] ygrp;
  logic [L-1:0]     ymsb;
  logic [R-1:0]     lut_w, msb_w;
  logic [W-1:0]     lut_term, msb_term, fb_sum, fb_carry, c_sum, c_carry;
  logic signed [W-1:0] cpa_sum;
  logic signed [N-1:0] yq_next;
  logic                sat_next;

  da_controller #(.G(G), .FEEDBACK(1'b1)) u_ctrl (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .load, .shift,
    .acc_clr, .msb_sel, .cap, .wb, .busy()
  );

  da_delay_line #(.TAPS(K), .N(N), .BCF(BCF)) u_xline (
    .clk, .rst_n, .load, .din(x_in), .shift,
    .grp(xgrp), .msb(xmsb), .words()
  );

  da_delay_line #(.TAPS(L), .N(N), .BCF(BCF)) u_yline (
    .clk, .rst_n, .load(wb), .din(yq_next), .shift,
    .grp(ygrp), .msb(ymsb), .words()
  );

  da_lut_rom #(.TAPS(T), .BCF(BCF), .CW(CW), .R(R), .COEFS(COEFS)) u_lut (
    .addr({ygrp, xgrp}), .data(lut_w)
  );

  da_msb_rom #(.TAPS(T), .BCF(BCF), .CW(CW), .R(R), .COEFS(COEFS)) u_msb (
    .addr({ymsb, xmsb}), .data(msb_w)
  );

  always_comb begin
    lut_term = W'($signed(lut_w)) << (N - BCF);
    msb_term = msb_sel ? (W'($signed(msb_w)) << (N - BCF)) : '0;
  end

  compressor_4to2 #(.W(W)) u_comp (
    .in0(lut_term), .in1(msb_term), .in2(fb_sum), .in3(fb_carry),
    .sum(c_sum), .carry(c_carry)
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
