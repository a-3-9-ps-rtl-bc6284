// tdl_delay_pkg: delay figures of the behavioural carry chain model.
//
// The delays of a real chain come from silicon and placement; this package
// stands in for them with a fixed pseudo-random spread, so a simulation sees
// unequal bins and, when asked for, bubbles. All values are integer
// femtoseconds. For tap j (carry-in CI_j):
//   carry delay  CI_j -> CO_j = CI_(j+1):  tap_fs(j)
//   sum delay    CI_j -> O_j           :  xor_fs(j) = tap_fs(j) * pct / 100
//   clock skew of the slice holding j  :  skew_fs(j / 8), added to both outputs
// Arrival time of O_j and CO_j at their flip-flops follows from these; the
// function arrival_fs gives it for sampled bit r (r = 2j is O_j, r = 2j+1 is CO_j).
package tdl_delay_pkg;
  timeunit 1ps; timeprecision 1fs;

  function automatic int unsigned mix(int unsigned x);
    int unsigned y;
    y = x;
    y = y ^ (y >> 16);
    y = y * 32'h7feb352d;
    y = y ^ (y >> 15);
    y = y * 32'h846ca68b;
    y = y ^ (y >> 16);
    return y;
  endfunction

  function automatic int unsigned tap_fs(int unsigned j, int unsigned seed,
                                         int unsigned min_fs, int unsigned span_fs);
    return min_fs + (mix(j * 3 + seed * 7919 + 1) % span_fs);
  endfunction

  function automatic int unsigned xor_fs(int unsigned j, int unsigned seed,
                                         int unsigned min_fs, int unsigned span_fs,
                                         int unsigned pct_min, int unsigned pct_span);
    int unsigned pct;
    pct = pct_min + (mix(j * 5 + seed * 104729 + 2) % pct_span);
    return tap_fs(j, seed, min_fs, span_fs) * pct / 100;
  endfunction

  function automatic int unsigned skew_fs(int unsigned slice, int unsigned seed,
                                          int unsigned max_fs);
    return (max_fs == 0) ? 0 : (mix(slice * 7 + seed * 1299709 + 3) % (max_fs + 1));
  endfunction

  // Time from the launcher edge until sampled bit r changes at its flip-flop.
  function automatic longint unsigned arrival_fs(int unsigned r, int unsigned seed,
      int unsigned min_fs, int unsigned span_fs, int unsigned pct_min,
      int unsigned pct_span, int unsigned skew_max_fs);
    longint unsigned t;
    int unsigned j;
    j = r / 2;
    t = 0;
    for (int unsigned i = 0; i < j; i++) t += longint'(tap_fs(i, seed, min_fs, span_fs));
    if (r % 2 == 0) t += longint'(xor_fs(j, seed, min_fs, span_fs, pct_min, pct_span));
    else            t += longint'(tap_fs(j, seed, min_fs, span_fs));
    t += longint'(skew_fs(j / 8, seed, skew_max_fs));
    return t;
  endfunction
endpackage
