// da_quantizer: Q(.) of the recursive filters, from the full-precision sum
// back to an N-bit sample.
//
// The sum carries FRAC fractional bits more than a sample (those of the
// coefficients). They are dropped by an arithmetic right shift (truncation
// towards minus infinity) and the result is saturated to the N-bit two's
// complement range; sat flags a clipped value. Combinational.
// The paper names Q(.) and its R-to-N width only; truncation and
// saturation are this design's choices.
module da_quantizer #(
  parameter int W    = 40,
  parameter int N    = 16,
  parameter int FRAC = 14
) (
  input  logic signed [W-1:0] din,
  output logic signed [N-1:0] dout,
  output logic                sat
);
  localparam logic signed [W-1:0] MAXV = W'((64'sd1 <<< (N - 1)) - 1);
  localparam logic signed [W-1:0] MINV = -W'(64'sd1 <<< (N - 1));

  logic signed [W-1:0] shifted;

  always_comb begin
    shifted = din >>> FRAC;
    if (shifted > MAXV) begin
      dout = MAXV[N-1:0];
      sat  = 1'b1;
    end else if (shifted < MINV) begin
      dout = MINV[N-1:0];
      sat  = 1'b1;
    end else begin
      dout = shifted[N-1:0];
      sat  = 1'b0;
    end
  end
endmodule
