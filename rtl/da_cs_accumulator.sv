// da_cs_accumulator: the shift-accumulate loop of a DA engine kept in
// carry-save form, plus its output stage (clk_S capture registers, carry-
// propagate adder and output register).
//
// Two W-bit registers hold the running sum as a sum/carry pair ("R | N"
// registers of the paper's figures). Each clock with en high they take the
// compressor's new pair; their contents go back to the compressor shifted
// right arithmetically by BCF (fb_sum, fb_carry). acc_clr zeroes them.
// On cap (last clock of a sample) the compressor pair is also captured into
// the two capture registers; the carry-propagate adder (CPA) adds them
// (cpa_sum, combinational, used by the recursive filters' quantiser), and one
// clock later the output register takes the low YW bits of that sum and
// y_valid pulses. Latency from cap: one clock.
//
// Only the final carry-propagate addition is a real adder; inside the loop
// every addition is carry-save, as in the paper. Widths, the one-clock
// output stage and the asynchronous reset are this design's choices.
module da_cs_accumulator #(
  parameter int W   = 40,
  parameter int BCF = 2,
  parameter int YW  = 34
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 acc_clr,
  input  logic                 en,
  input  logic                 cap,
  input  logic [W-1:0]         sum_in,
  input  logic [W-1:0]         carry_in,
  output logic [W-1:0]         fb_sum,
  output logic [W-1:0]         fb_carry,
  output logic signed [W-1:0]  cpa_sum,
  output logic signed [YW-1:0] y,
  output logic                 y_valid
);
  logic [W-1:0] acc_s, acc_c;
  logic [W-1:0] cap_s, cap_c;
  logic         cap_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (acc_clr) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (en) begin
      acc_s <= sum_in;
      acc_c <= carry_in;
    end
  end

  always_comb begin
    fb_sum   = W'($signed(acc_s) >>> BCF);
    fb_carry = W'($signed(acc_c) >>> BCF);
    cpa_sum  = $signed(cap_s + cap_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_s   <= '0;
      cap_c   <= '0;
      cap_d   <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      if (cap) begin
        cap_s <= sum_in;
        cap_c <= carry_in;
      end
      cap_d   <= cap;
      y_valid <= cap_d;
      if (cap_d) y <= cpa_sum[YW-1:0];
    end
  end
endmodule
