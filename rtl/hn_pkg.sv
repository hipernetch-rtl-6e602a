// hn_pkg: constants and pipeline-geometry functions shared by the switch.
//
// The switch is one long pipeline whose stages are numbered from 0 at the
// input. Two pipelines run side by side at the start: the sorting network
// (L*(L+1)/2 stages, L = log2(P)) and the 'offsets' pipeline (adder trees,
// offset counters with prefix sum, subtractors: 2*L+1 stages). Whichever is
// shorter starts later or is padded, so both end together at stage PRE-1;
// the rotators then take L more stages. These formulas follow the
// latency equations of the architecture (pipeline length 4/7/10/14/20 for
// P = 2/4/8/16/32).
//
// Register removal: with latency-reduction factor S, only the stages whose
// distance from the compulsory register (the offset-counter stage, which
// has a feedback loop) is a multiple of S keep their registers; the others
// become wires. stage_reg() encodes that rule.
package hn_pkg;

  // Number of sorting-network stages (Batcher odd-even merge sort).
  function automatic int unsigned sn_len(int unsigned l);
    return (l * (l + 1)) / 2;
  endfunction

  // Number of stages of the offsets pipeline.
  function automatic int unsigned off_len(int unsigned l);
    return 2 * l + 1;
  endfunction

  // Length of the two merged pipelines (before the rotators).
  function automatic int unsigned pre_len(int unsigned l);
    return (sn_len(l) > off_len(l)) ? sn_len(l) : off_len(l);
  endfunction

  // First stage of the offsets pipeline. When the sorting network is the
  // longer one the offsets pipeline taps a later sorting-network stage, so
  // no synchronising registers are needed.
  function automatic int unsigned off_start(int unsigned l);
    return pre_len(l) - off_len(l);
  endfunction

  // Total pipeline length without register removal.
  function automatic int unsigned pipe_len(int unsigned l);
    return pre_len(l) + l;
  endfunction

  // Index of the compulsory register stage (offset counters).
  function automatic int unsigned idx_comp(int unsigned l);
    return pre_len(l) - 1 - l;
  endfunction

  // 1 when global stage k keeps its output register.
  function automatic bit stage_reg(int unsigned k, int unsigned l, int unsigned s);
    int unsigned d;
    d = (k >= idx_comp(l)) ? (k - idx_comp(l)) : (idx_comp(l) - k);
    return (d % s) == 0;
  endfunction

  // Number of registered stages in [first, first+n): latency of a segment.
  function automatic int unsigned regs_in(int unsigned first, int unsigned n,
                                          int unsigned l, int unsigned s);
    int unsigned c;
    c = 0;
    for (int unsigned k = first; k < first + n; k++)
      if (stage_reg(k, l, s)) c++;
    return c;
  endfunction

  // Pipeline latency in cycles after register removal.
  function automatic int unsigned latency_opt(int unsigned l, int unsigned s);
    return regs_in(0, pipe_len(l), l, s);
  endfunction

endpackage
