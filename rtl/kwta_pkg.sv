// kwta_pkg: shared constants and helpers of the parallel k-winners-take-all
// (kWTA) search engine.
//
// Partial counts travel between the 1-counters, the Sigma-circuits and the
// top level as a "count bundle" of N_Sigma = 1 + ceil(log2(k+1)) lines: the
// top line is an overflow flag meaning "more than k", the lower lines a
// binary count 0..k that is valid only while the flag is clear. The width
// follows the document's formula for the number of inputs of a Sigma-circuit;
// the split into flag plus binary count is this design's own reading of it.
package kwta_pkg;

  // Width of a count bundle for a given k (N_Sigma).
  function automatic int unsigned cnt_lines(input int unsigned k);
    return 1 + $clog2(k + 1);
  endfunction

  // Integer power, used to size the counting tree (N = N1 * L**(LEVELS-1)).
  function automatic int unsigned ipow(input int unsigned b, input int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

endpackage
