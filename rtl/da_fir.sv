// da_fir: FIR filter of K taps by distributed arithmetic, processing BCF
// bits of every tap per clock (the proposed FIR architecture).
//
//   y[n] = sum_{k=0}^{K-1} A_k * x[n-k]
//
// Samples are N-bit two's complement; coefficients CW-bit signed, tap k at
// COEFS[k*CW +: CW]. The result y_out is the exact integer sum (SW bits), so
// with Q1.15 samples and Qa.b coefficients it has 15+b fractional bits.
//
// How it works: the delay line shifts BCF bits per clock out of every tap;
// those K groups address the look-up table (da_lut_rom), whose word is
// added, together with the fed-back accumulator pair shifted right by BCF,
// in a 4:2 carry-save compressor. In the last clock the MSB multiplexer adds
// the word of the MSB-correction table (da_msb_rom), which gives the sign
// bits their negative weight. The final pair is captured and added once by a
// carry-propagate adder.
//
// Interface and timing: a sample is taken when x_valid && x_ready. It takes
// G = N/BCF clocks; the next sample may be taken on the last of them, so a
// continuous stream runs at one sample per G clocks (BCF bits per clock).
// y_valid pulses with the result G+1 clocks after the sample was taken.
// The architecture (tables, MSB multiplexer, 4:2 compressor, CPA) is the
// paper's; the single clock with enables, the handshake, the table
// scaling and all widths are this design's.
module da_fir
  import da_pkg::*;
#(
  parameter int                N     = 16,
  parameter int                BCF   = 2,
  parameter int                K     = 3,
  parameter int                CW    = 16,
  parameter logic [K*CW-1:0]   COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  localparam int               SW    = sum_width(N, CW, K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         x_in,
  input  logic                 x_valid,
  output logic                 x_ready,
  output logic signed [SW-1:0] y_out,
  output logic                 y_valid
);
  localparam int G = N / BCF;
  localparam int R = rom_width(COEF_BITS_MAX'(COEFS), K, CW, BCF);
  localparam int W = acc_width(N, BCF, R);

  if (N % BCF != 0) begin : g_bad_bcf
    $error("BCF must divide N");
  end

  logic load, shift, acc_clr, msb_sel, cap;
  logic [K*BCF-1:0] grp;
  logic [K-1:0]     msb;
  logic [R-1:0]     lut_w, msb_w;
  logic [W-1:0]     lut_term, msb_term, fb_sum, fb_carry, c_sum, c_carry;

  da_controller #(.G(G), .FEEDBACK(1'b0)) u_ctrl (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .load, .shift,
    .acc_clr, .msb_sel, .cap, .wb(), .busy()
  );

  da_delay_line #(.TAPS(K), .N(N), .BCF(BCF)) u_xline (
    .clk, .rst_n, .load, .din(x_in), .shift, .grp, .msb, .words()
  );

  da_lut_rom #(.TAPS(K), .BCF(BCF), .CW(CW), .R(R), .COEFS(COEFS)) u_lut (
    .addr(grp), .data(lut_w)
  );

  da_msb_rom #(.TAPS(K), .BCF(BCF), .CW(CW), .R(R), .COEFS(COEFS)) u_msb (
    .addr(msb), .data(msb_w)
  );

  // Table words enter at bit N-BCF; the MSB multiplexer passes the
  // correction word only in the last clock of a sample.
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
    .cpa_sum(), .y(y_out), .y_valid
  );
endmodule
