// ecc_match_pkg: shared constants, types and elaboration-time functions of the
// ECC tag matcher.
//
// The matcher compares an incoming k-bit tag with a stored n-bit systematic
// codeword without decoding the codeword first. The incoming tag is encoded,
// both halves of the codeword (tag bits and parity bits) are XORed with their
// counterparts in parallel, and the number of differing bits (the Hamming
// distance d) is counted by butterfly-formed weight accumulators (BWAs).
//
// A BWA over N = 2**L inputs has L stages of N/2 half adders. Output bit idx
// of the last stage carries weight 2**(L - popcount(idx)), so that the sum of
// the weights of the set outputs equals the number of ones at the inputs.
// The functions below give these weights and the sizes of the second level,
// so that every module derives the same structure from the same few
// parameters.
//
// Defaults follow the 4-bit decimal matrix code (DMC) of the design: a 2x2
// matrix of information bits, two horizontal and two vertical check bits,
// giving an (8,4) code. The correctable range T_MAX = 1 and the largest
// distance still treated as "same tag" R_MAX = 1 are this design's reading of
// the code, whose minimum distance is 3.
package ecc_match_pkg;

  // Default DMC matrix shape: two symbols (rows) of two bits (columns).
  localparam int unsigned DMC_ROWS = 2;
  localparam int unsigned DMC_COLS = 2;
  // Range limits of the Hamming distance (see decision_unit).
  localparam int unsigned T_MAX_DEF = 1;
  localparam int unsigned R_MAX_DEF = 1;

  // Result of one comparison.
  typedef enum logic [1:0] {
    RES_MATCH    = 2'd0,  // d <= T_MAX: same tag (possibly with a correctable error)
    RES_FAULT    = 2'd1,  // T_MAX < d <= R_MAX: stored word corrupt beyond correction
    RES_MISMATCH = 2'd2   // d > R_MAX: different tag
  } match_res_e;

  // Ceiling log2, with clog2(1) = 0.
  function automatic int unsigned clog2(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of half-adder stages of a BWA with n inputs (inputs padded to 2**L).
  function automatic int unsigned bwa_levels(input int unsigned n);
    return clog2(n);
  endfunction

  function automatic int unsigned popcnt(input int unsigned v);
    int unsigned c;
    c = 0;
    while (v != 0) begin
      c += v & 1;
      v = v >> 1;
    end
    return c;
  endfunction

  // Weight of output bit idx of a BWA with l stages.
  function automatic int unsigned bwa_w(input int unsigned l, input int unsigned idx);
    return 1 << (l - popcnt(idx));
  endfunction

  // Number of outputs of weight w of a BWA with l stages.
  function automatic int unsigned bwa_cnt(input int unsigned l, input int unsigned w);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < (1 << l); i++) if (bwa_w(l, i) == w) c++;
    return c;
  endfunction

  // Index of the m-th output (counting from 0) of weight w of a BWA with l stages.
  function automatic int unsigned bwa_sel(input int unsigned l, input int unsigned w,
                                          input int unsigned m);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < (1 << l); i++) begin
      if (bwa_w(l, i) == w) begin
        if (c == m) return i;
        c++;
      end
    end
    return 0;
  endfunction

  // Largest power of two not above r (at least 1).
  function automatic int unsigned pmax_of(input int unsigned r);
    int unsigned p;
    p = 1;
    while (2 * p <= r) p = 2 * p;
    return p;
  endfunction

  // Number of inputs of the second-level BWA for weight 2**j: the first-level
  // outputs of that weight from the tag BWA (kt inputs) and the parity BWA
  // (kp inputs).
  function automatic int unsigned l2_inputs(input int unsigned kt, input int unsigned kp,
                                            input int unsigned j);
    return bwa_cnt(bwa_levels(kt), 1 << j) + bwa_cnt(bwa_levels(kp), 1 << j);
  endfunction

  // Output width of the widest second-level BWA, for weights 2**0 .. 2**lp.
  function automatic int unsigned l2_out_width(input int unsigned kt, input int unsigned kp,
                                               input int unsigned lp);
    int unsigned m;
    m = 1;
    for (int unsigned j = 0; j <= lp; j++)
      if ((1 << bwa_levels(l2_inputs(kt, kp, j))) > m) m = 1 << bwa_levels(l2_inputs(kt, kp, j));
    return m;
  endfunction

  // Absolute weight of output bit i of the second-level BWA for 2**j's
  // (0 for padding bits, for an empty BWA and for bits above pmax, which
  // the revised BWA never sets).
  function automatic int unsigned l2_bit_weight(input int unsigned kt, input int unsigned kp,
                                                input int unsigned pmax,
                                                input int unsigned j, input int unsigned i);
    int unsigned m, w;
    m = l2_inputs(kt, kp, j);
    if (m == 0 || i >= (1 << bwa_levels(m))) return 0;
    w = (1 << j) * bwa_w(bwa_levels(m), i);
    return (w > pmax) ? 0 : w;
  endfunction

  // Largest value the second level can report without an overflow: the sum of
  // the weights of all its output bits.
  function automatic int unsigned l2_max_sum(input int unsigned kt, input int unsigned kp,
                                             input int unsigned lp);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j <= lp; j++)
      for (int unsigned i = 0; i < l2_out_width(kt, kp, lp); i++)
        s += l2_bit_weight(kt, kp, 1 << lp, j, i);
    return s;
  endfunction

  // Width of the distance reported by the decision unit.
  function automatic int unsigned dist_width(input int unsigned kt, input int unsigned kp,
                                             input int unsigned r_max);
    return clog2(l2_max_sum(kt, kp, clog2(pmax_of(r_max))) + 1);
  endfunction

endpackage
