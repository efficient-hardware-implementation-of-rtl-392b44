// compressor_4to2: reduces four W-bit operands to a sum/carry pair,
// in0 + in1 + in2 + in3 == sum + carry (mod 2^W).
//
// Two rows of full adders (a two-level Wallace tree): the first row takes
// in0..in2, the second adds in3 to its result. In the DA engines the inputs
// are the look-up table word, the MSB-correction word and the two
// fed-back accumulator vectors, so no carry ever propagates inside the
// accumulation loop. Purely combinational; the 4:2 arrangement is the
// paper's, the row structure is this design's.
module compressor_4to2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1, c1;

  csa_3to2 #(.W(W)) u_row1 (.a(in0), .b(in1), .c(in2), .sum(s1),  .carry(c1));
  csa_3to2 #(.W(W)) u_row2 (.a(s1),  .b(c1),  .c(in3), .sum(sum), .carry(carry));
endmodule
