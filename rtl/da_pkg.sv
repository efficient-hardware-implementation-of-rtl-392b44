// da_pkg: shared sizing rules and types for the distributed-arithmetic (DA)
// filter engines.
//
// A DA engine consumes BCF bits ("bits combination factor") of every tap per
// circuit clock, so one N-bit sample takes N/BCF circuit clocks. The look-up
// tables hold, for every combination of the BCF-bit groups of all taps, the
// sum  sum_k A_k * u_k  (u_k = unsigned value of tap k's group). The MSB
// table holds -2^BCF * sum_k A_k * s_k (s_k = sign bit of tap k), which turns
// the sign bit's positive weight, added in with the top group, into the
// negative weight two's complement requires.
//
// Table and accumulator widths follow the coefficients a filter is built
// with; the output ports are sized for any coefficients of the given width.
package da_pkg;

  // Widest coefficient vector the sizing function below accepts.
  localparam int COEF_BITS_MAX = 4096;

  // Width of a table word (signed) for a given coefficient set, packed with
  // coefficient k at coefs[k*cw +: cw]. With S = sum_k |A_k|, table words lie
  // in [-(2^bcf) S, (2^bcf - 1) S] (the negative end is the MSB table), so
  // floor(log2 S) + bcf magnitude bits plus one more and a sign bit suffice.
  // This is the paper's R = floor(log2 sum|A_k|) + BCF, plus the sign bit
  // and the extra bit of the doubled MSB word in this design's integer scaling.
  function automatic int rom_width(logic [COEF_BITS_MAX-1:0] coefs, int taps,
                                   int cw, int bcf);
    longint s, v;
    s = 0;
    for (int k = 0; k < taps; k++) begin
      v = 0;
      for (int b = 0; b < cw; b++) v[b] = coefs[k*cw + b];
      if (coefs[k*cw + cw - 1]) v = v - (longint'(1) << cw);
      s += (v < 0) ? -v : v;
    end
    return $clog2(s + 1) + bcf + 1;
  endfunction

  // Guard bits above the table words in the carry-save accumulator. The sum
  // and carry vectors are shifted right separately, so each must stay a
  // correct signed number on its own; a carry-save row lets the vectors'
  // sign-extension region creep up by about one bit per row. With BCF >= 2
  // the right shift removes that creep every clock, with BCF = 1 it can pile
  // up once per clock, hence the N-dependent guard.
  function automatic int acc_guard(int n, int bcf);
    return (bcf == 1) ? n + 5 : 5;
  endfunction

  // Width of the carry-save accumulator: the table words (r bits, sized for
  // all coefficients that feed the accumulator) enter at bit position n-bcf
  // so that, after the last of n/bcf clocks, the sum carries no fractional
  // bits and nothing shifted out was ever non-zero. The final sum needs at
  // most floor(log2 S) + n + 1 bits, which this always covers.
  function automatic int acc_width(int n, int bcf, int r);
    return n - bcf + r + acc_guard(n, bcf);
  endfunction

  // Width of the exact filter sum sum_k A_k * x_k (integer scaling), for any
  // coefficients of width cw; used for the output ports.
  function automatic int sum_width(int n, int cw, int taps);
    return n + cw + $clog2(taps);
  endfunction

  // Sequencer states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // waiting for a sample
    ST_RUN  = 2'd1,   // shifting BCF bits per clock through the tables
    ST_WB   = 2'd2    // recursive filters: output written back into the delay line
  } da_state_e;

endpackage
