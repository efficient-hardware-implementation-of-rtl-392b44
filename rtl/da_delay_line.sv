// da_delay_line: the tapped delay line of a DA filter, built as one long
// serial shift register that advances BCF bits per circuit clock.
//
// TAPS registers of N bits each. Register 0 holds the newest sample and is
// loaded in parallel (load, din). On every clock with shift high, each
// register shifts right by BCF: its BCF least significant bits leave to the
// look-up table address (grp) and, at the same time, enter the top of the
// next register. After N/BCF shifts register k+1 holds what register k held
// before, so the delay line has moved on by one sample while the tables saw
// every BCF-bit group of every tap, least significant group first. The bits
// that fall out of the last register are dropped; zeros fill register 0.
// A load in the same clock as a shift overrides register 0 only; the other
// registers still take their shift.
//
// Outputs: grp[k*BCF +: BCF] is the current lowest group of register k, msb[k]
// is bit BCF-1 of register k, which during the last shift of a sample is the
// sample's sign bit. words exposes the registers for observation.
// The serial chain follows the paper's figures; the reset to zero and the
// parallel load port are this design's choices.
module da_delay_line #(
  parameter int TAPS = 3,
  parameter int N    = 16,
  parameter int BCF  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         din,
  input  logic                 shift,
  output logic [TAPS*BCF-1:0]  grp,
  output logic [TAPS-1:0]      msb,
  output logic [TAPS*N-1:0]    words
);
  logic [N-1:0] sr [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) sr[k] <= '0;
    end else begin
      if (shift) begin
        sr[0] <= sr[0] >> BCF;
        for (int k = 1; k < TAPS; k++)
          sr[k] <= {sr[k-1][BCF-1:0], sr[k][N-1:BCF]};
      end
      if (load) sr[0] <= din;
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      grp[k*BCF +: BCF] = sr[k][BCF-1:0];
      msb[k]            = sr[k][BCF-1];
      words[k*N +: N]   = sr[k];
    end
  end
endmodule
