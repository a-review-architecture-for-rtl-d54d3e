// ecc_match_pkg -- shared types and elaboration-time helpers for the
// systematic-ECC tag matcher.
//
// The matcher sorts the Hamming distance d between an incoming tag's
// codeword and a retrieved codeword into four ranges: d = 0, 1..T_MAX
// (correctable), T_MAX+1..R_MAX (detectable only) and above R_MAX.
// The butterfly-formed weight accumulators (BWAs) label every output bit
// with a weight that is a power of two; the functions below compute those
// weights and the wiring of the interconnection so that every module that
// needs the same layout derives it from the same formulas.
//
// BWA output numbering: a BWA with M stages has 2**M outputs. Output j has
// weight 2**(BASE + M - popcount(j)), i.e. every 0 in the M-bit index j is
// one carry taken on the way down the butterfly. For M = 3 this gives the
// weights 8,4,4,2,4,2,2,1 of outputs I..P in the 8-input example.
package ecc_match_pkg;

  // Hamming-distance range (the four ranges used by the decision unit).
  typedef enum logic [1:0] {
    HD_ZERO        = 2'd0,  // d = 0: exact match
    HD_CORRECTABLE = 2'd1,  // 0 < d <= T_MAX: match after correction
    HD_DETECTABLE  = 2'd2,  // T_MAX < d <= R_MAX: uncorrectable error, fault
    HD_BEYOND      = 2'd3   // d > R_MAX: mismatch
  } hd_range_e;

  // ceil(log2(x)), 0 for x <= 1.
  function automatic int clog2i(input int x);
    int r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  // floor(log2(x)) for x >= 1.
  function automatic int flog2i(input int x);
    int r;
    r = 0;
    while ((2 << r) <= x) r++;
    return r;
  endfunction

  function automatic int popcnt(input int x);
    int c;
    c = 0;
    for (int b = 0; b < 31; b++) c += (x >> b) & 1;
    return c;
  endfunction

  // Binomial coefficient n over k (0 when k > n or k < 0).
  function automatic int binom(input int n, input int k);
    int r;
    if (k < 0 || k > n) return 0;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // Weight exponent of output j of a BWA with m stages and base exponent base.
  function automatic int bwa_exp(input int m, input int base, input int j);
    return base + m - popcnt(j);
  endfunction

  // P_max exponent: P_max is the largest power of two not above R_MAX+1.
  function automatic int pmax_log2(input int r_max);
    return flog2i(r_max + 1);
  endfunction

  // Number of first-level bits of weight 2**e (tag BWA with mt stages,
  // parity BWA with mp stages, both with base weight 1).
  function automatic int l2_count(input int mt, input int mp, input int e);
    return binom(mt, e) + binom(mp, e);
  endfunction

  // Stages of the second-level BWA for weight 2**e.
  function automatic int l2_stages(input int mt, input int mp, input int e);
    return clog2i(l2_count(mt, mp, e));
  endfunction

  // Output width of the second-level BWA for weight 2**e (0 if it is absent).
  function automatic int l2_width(input int mt, input int mp, input int e);
    return (l2_count(mt, mp, e) == 0) ? 0 : (1 << l2_stages(mt, mp, e));
  endfunction

  // Offset of the weight-2**e BWA's outputs in the flat second-level vector.
  function automatic int l2_offset(input int mt, input int mp, input int e);
    int o;
    o = 0;
    for (int x = 0; x < e; x++) o += l2_width(mt, mp, x);
    return o;
  endfunction

  // Total width of the flat second-level weight vector (weights 2**0..2**pm).
  function automatic int l2_total(input int mt, input int mp, input int pm);
    return l2_offset(mt, mp, pm + 1);
  endfunction

  // Weight exponent of bit p of the flat second-level weight vector.
  function automatic int l2_bit_exp(input int mt, input int mp, input int pm, input int p);
    for (int e = 0; e <= pm; e++) begin
      if (p >= l2_offset(mt, mp, e) && p < l2_offset(mt, mp, e + 1))
        return bwa_exp(l2_stages(mt, mp, e), e, p - l2_offset(mt, mp, e));
    end
    return 31;
  endfunction

  // Interconnection: source of input i of the second-level BWA for weight
  // 2**e. The first-level outputs are seen as one vector {parity, tag}: the
  // tag BWA's 2**mt outputs at 0.., the parity BWA's 2**mp outputs after them.
  // Tag bits of the weight come first, in index order, then parity bits.
  function automatic int l2_src(input int mt, input int mp, input int e, input int i);
    int n;
    n = 0;
    for (int j = 0; j < (1 << mt); j++)
      if (bwa_exp(mt, 0, j) == e) begin
        if (n == i) return j;
        n++;
      end
    for (int j = 0; j < (1 << mp); j++)
      if (bwa_exp(mp, 0, j) == e) begin
        if (n == i) return (1 << mt) + j;
        n++;
      end
    return -1;
  endfunction

endpackage
