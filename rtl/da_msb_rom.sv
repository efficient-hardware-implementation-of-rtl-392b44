// da_msb_rom: the MSB-correction table ("single-port RAM/ROM" holding the
// two's complement of twice the sign-bit contribution).
//
// Addressed by the sign bits of all taps (tap k at addr[k]). The main table
// adds the sign bits with weight +2^(BCF-1) inside the top group; the true
// weight is -2^(BCF-1). This table therefore holds
//     -2 * 2^(BCF-1) * sum_k A_k * addr[k]  =  -2^BCF * sum_k A_k * addr[k],
// which the engine adds during the last clock of a sample (through the MSB
// multiplexer) to turn the one into the other. Depth 2^TAPS, width R signed,
// asynchronous read, contents fixed from COEFS at elaboration.
// The content rule is the paper's; the integer scaling and the read style
// are this design's.
module da_msb_rom
  import da_pkg::*;
#(
  parameter int                     TAPS  = 3,
  parameter int                     BCF   = 2,
  parameter int                     CW    = 16,
  parameter logic [TAPS*CW-1:0]     COEFS = {16'sd1105, 16'sd2210, 16'sd1105},
  parameter int                     R     = rom_width(COEF_BITS_MAX'(COEFS), TAPS, CW, BCF)
) (
  input  logic [TAPS-1:0] addr,
  output logic [R-1:0]    data
);
  localparam int DEPTH = 1 << TAPS;

  logic [R-1:0] mem [DEPTH];

  function automatic logic [R-1:0] entry(int unsigned a);
    longint t;
    t = 0;
    for (int k = 0; k < TAPS; k++)
      if (a[k]) t += longint'($signed(COEFS[k*CW +: CW]));
    return R'(-(t <<< BCF));
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = entry(a);
  end

  assign data = mem[addr];
endmodule
