// compressor_6to2: reduces six W-bit operands to a sum/carry pair,
// in0 + ... + in5 == sum + carry (mod 2^W).
//
// A three-level Wallace tree of four full-adder rows: 6 -> 4 -> 3 -> 2.
// The recursive-filter engine with separate feed-forward and feedback
// tables uses it for its two table words, two MSB-correction words and the
// two fed-back accumulator vectors. Purely combinational; the 6:2 arrangement
// is the paper's, the row structure is this design's.
module compressor_6to2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [W-1:0] in4,
  input  logic [W-1:0] in5,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1, c1, s2, c2, s3, c3;

  csa_3to2 #(.W(W)) u_l1a (.a(in0), .b(in1), .c(in2), .sum(s1),  .carry(c1));
  csa_3to2 #(.W(W)) u_l1b (.a(in3), .b(in4), .c(in5), .sum(s2),  .carry(c2));
  csa_3to2 #(.W(W)) u_l2  (.a(s1),  .b(c1),  .c(s2),  .sum(s3),  .carry(c3));
  csa_3to2 #(.W(W)) u_l3  (.a(s3),  .b(c3),  .c(c2),  .sum(sum), .carry(carry));
endmodule
