// modmul_pkg: types and elaboration-time helpers shared by the modulo 2^n+1
// multiplier.
//
// The partial product reduction array is built stage by stage. Every column
// of the array is identical, so a stage is fully described by one number:
// how many bits of equal weight each column holds when the stage starts (its
// "pool"). The compressor used in a stage is the largest one that the pool
// can feed, in the order of preference 7:2, 5:2, 4:2, 3:2 (the order the
// reduction scheme prescribes). Applying that rule from n+1 rows down to two
// rows gives, for n = 16, two 7:2 stages, one 5:2 stage and two 3:2 stages,
// and for n = 8 one 7:2 stage and two 3:2 stages.
//
// Carry-generate/propagate pairs for the final adder are kept in gp_t, with
// the usual prefix operator gp_merge (hi o lo).
package modmul_pkg;

  // Compressor kinds used in one reduction stage.
  typedef enum logic [2:0] {
    CMP_NONE = 3'd0,
    CMP_32   = 3'd1,
    CMP_42   = 3'd2,
    CMP_52   = 3'd3,
    CMP_72   = 3'd4
  } cmp_kind_e;

  // Generate/propagate pair (g = a AND b, p = a OR b at bit level).
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // (g_hi, p_hi) o (g_lo, p_lo) = (g_hi + p_hi g_lo, p_hi p_lo)
  function automatic gp_t gp_merge(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Bits of equal weight a compressor consumes (7:2 and 5:2 include their
  // two carry inputs, 4:2 its one carry input).
  function automatic int cmp_inputs(cmp_kind_e k);
    case (k)
      CMP_72:  return 9;
      CMP_52:  return 7;
      CMP_42:  return 5;
      CMP_32:  return 3;
      default: return 0;
    endcase
  endfunction

  // Outputs of weight 2^(i+1) (carry plus carry-outs).
  function automatic int cmp_w2(cmp_kind_e k);
    case (k)
      CMP_72:  return 2;
      CMP_52:  return 3;
      CMP_42:  return 2;
      CMP_32:  return 1;
      default: return 0;
    endcase
  endfunction

  // Outputs of weight 2^(i+2) (only the 7:2 compressor has one).
  function automatic int cmp_w4(cmp_kind_e k);
    return (k == CMP_72) ? 1 : 0;
  endfunction

  // Largest compressor a pool of m bits can feed.
  function automatic cmp_kind_e cmp_choose(int m);
    if (m >= 9) return CMP_72;
    if (m >= 7) return CMP_52;
    if (m >= 5) return CMP_42;
    if (m >= 3) return CMP_32;
    return CMP_NONE;
  endfunction

  // Pool size after applying one stage to a pool of m bits.
  function automatic int pool_next(int m);
    cmp_kind_e k;
    k = cmp_choose(m);
    return m - cmp_inputs(k) + 1 + cmp_w2(k) + cmp_w4(k);
  endfunction

  // Pool size at the start of stage s for an n-bit multiplier (n+1 rows).
  function automatic int pool_size(int n, int s);
    int m;
    m = n + 1;
    for (int i = 0; i < s; i++) m = pool_next(m);
    return m;
  endfunction

  // Number of stages that take n+1 rows down to two.
  function automatic int num_stages(int n);
    int m;
    int s;
    m = n + 1;
    s = 0;
    while (m > 2) begin
      m = pool_next(m);
      s++;
    end
    return s;
  endfunction

  // Number of stages of a given kind (used by testbenches and reports).
  function automatic int count_kind(int n, cmp_kind_e k);
    int c;
    c = 0;
    for (int s = 0; s < num_stages(n); s++)
      if (cmp_choose(pool_size(n, s)) == k) c++;
    return c;
  endfunction

endpackage
