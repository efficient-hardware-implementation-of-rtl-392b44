// csa_3to2: one row of full adders (3:2 carry-save adder), the building
// cell of the Wallace-style compressors.
//
// Three W-bit vectors in, a sum vector and a carry vector out, with
// a + b + c == sum + carry (mod 2^W). The carry vector is the bitwise
// majority shifted up one place; the carry out of the top bit is dropped,
// which is harmless while the callers keep enough guard bits.
// Purely combinational. The compressor structure follows the paper's
// choice of a Wallace compression tree; the cell itself is standard.
module csa_3to2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = {(a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]), 1'b0};
  end
endmodule
