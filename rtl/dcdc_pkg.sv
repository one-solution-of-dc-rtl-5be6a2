// dcdc_pkg: constants and the default step-table rule shared by the adaptive
// delta-modulation controller of a digitally controlled DC/DC converter.
//
// The controller remembers the signs of the last HIST_BITS duty-cycle changes
// (1 = duty was increased, 0 = decreased) and turns that 4-bit history into a
// signed duty step through a 16-entry table. default_step() gives the table
// contents the design starts with after reset. With r the number of equal
// signs at the newest end of the history (1..4), r - 1 is the number of
// consecutive "keep direction" decisions (fi = 1) that produced them:
//
//   r = 2 (one fi = 1)     : BASE            same direction, no boost yet
//   r = 3 (two fi = 1)     : K1 * BASE       first boost
//   r = 4 (three fi = 1)   : K1 * K2 * BASE  largest step the history can see
//   r = 1 (fi = 0, reversal): after a single step (steady state) BASE; after a
//                            run of p >= 2 half the step of that run, never
//                            below BASE.
//
// The growth by K1 and K2 on consecutive "ones" and the halving on reversal
// follow the described algorithm; BASE and the K values are this design's
// defaults (the table can be rewritten at run time).
package dcdc_pkg;

  localparam int unsigned HIST_BITS = 4;   // signs remembered (t-1 .. t-4)
  localparam int unsigned LUT_DEPTH = 1 << HIST_BITS;

  // Change direction as stored in the delay line.
  typedef enum logic {
    SIGN_DEC = 1'b0,
    SIGN_INC = 1'b1
  } sign_e;

  // Length of the run of equal bits at the low (newest) end of h.
  function automatic int unsigned run_length(input logic [HIST_BITS-1:0] h);
    int unsigned r;
    r = 1;
    for (int unsigned i = 1; i < HIST_BITS; i++) begin
      if (r == i && h[i] == h[0]) r = i + 1;
    end
    return r;
  endfunction

  // Step magnitude for a run of r equal signs.
  function automatic int unsigned run_magnitude(input int unsigned r,
                                                input int unsigned base,
                                                input int unsigned k1,
                                                input int unsigned k2);
    int unsigned m;
    m = base;
    if (r >= 3) m = m * k1;
    if (r >= 4) m = m * k2;
    return m;
  endfunction

  // Signed default step for history h (h[0] = newest sign).
  function automatic int default_step(input logic [HIST_BITS-1:0] h,
                                      input int unsigned base,
                                      input int unsigned k1,
                                      input int unsigned k2);
    int unsigned r, p, mag;
    r = run_length(h);
    if (r >= 2) begin
      mag = run_magnitude(r, base, k1, k2);
    end else begin
      p = run_length(HIST_BITS'(h >> 1));
      if (p > HIST_BITS - 1) p = HIST_BITS - 1;
      if (p == 1) mag = base;
      else begin
        mag = run_magnitude(p, base, k1, k2) / 2;
        if (mag < base) mag = base;
      end
    end
    return h[0] ? int'(mag) : -int'(mag);
  endfunction

endpackage
