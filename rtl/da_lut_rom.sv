// da_lut_rom: the DA look-up table ("single-port RAM/ROM" holding the
// pre-computed partial sums).
//
// The address is the concatenation of the current BCF-bit group of every
// tap, tap k at addr[k*BCF +: BCF]. The word at that address is
//     sum_{i=0}^{BCF-1} 2^i * S_i,   S_i = sum_k A_k * addr[k*BCF + i],
// i.e. the contributions of the group's bits, each bit weighted by its place
// inside the group, so one read replaces BCF single-bit DA steps. It is
// computed bit by bit in that order when the table is initialised, from the
// coefficient parameter (COEFS, tap k at COEFS[k*CW +: CW], signed). The
// depth is 2^(TAPS*BCF), the width R bits signed.
//
// Read is asynchronous (LUT-style); the contents are fixed at elaboration.
// The content rule is the paper's, written in integer scaling (the group's
// least significant bit has weight 1); the asynchronous read is this design's.
module da_lut_rom
  import da_pkg::*;
#(
  parameter int                     TAPS  = 3,
  parameter int                     BCF   = 2,
  parameter int                     CW    = 16,
  parameter logic [TAPS*CW-1:0]     COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  parameter int                     R     = rom_width(COEF_BITS_MAX'(COEFS), TAPS, CW, BCF)
) (
  input  logic [TAPS*BCF-1:0] addr,
  output logic [R-1:0]        data
);
  localparam int AW    = TAPS * BCF;
  localparam int DEPTH = 1 << AW;

  logic [R-1:0] mem [DEPTH];

  function automatic logic [R-1:0] entry(int unsigned a);
    longint acc;
    longint s_i;
    acc = 0;
    for (int i = 0; i < BCF; i++) begin
      s_i = 0;
      for (int k = 0; k < TAPS; k++)
        if (a[k*BCF + i]) s_i += longint'($signed(COEFS[k*CW +: CW]));
      acc += s_i <<< i;
    end
    return R'(acc);
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = entry(a);
  end

  assign data = mem[addr];
endmodule
