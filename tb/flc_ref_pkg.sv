// flc_ref_pkg: reference arithmetic for the fuzzy controller testbenches.
//
// The functions below recompute, in plain integer arithmetic and without any
// of the RTL's structure, what each stage must produce: the slope-method
// membership degree, the term-level max-min inference with heights
// defuzzification, the chromosome expansion and the scaling of the
// incremental PD loop. Each testbench compares its block against them.
package flc_ref_pkg;
  import fuzzy_pkg::*;

  function automatic int ref_mf(int x, int a0, int a1, int a2, int a3);
    int d;
    if (x < a0 || x > a3) return 0;
    if (x >= a1 && x <= a2) return 255;
    if (x < a1) d = ((x - a0) * ((255 * 256) / (a1 - a0))) / 256;
    else        d = ((a3 - x) * ((255 * 256) / (a3 - a2))) / 256;
    return (d > 255) ? 255 : d;
  endfunction

  // Ideal (real-valued) degree, for a tolerance check of the fixed point.
  function automatic real ideal_mf(int x, int a0, int a1, int a2, int a3);
    if (x < a0 || x > a3) return 0.0;
    if (x >= a1 && x <= a2) return 255.0;
    if (x < a1) return 255.0 * real'(x - a0) / real'(a1 - a0);
    return 255.0 * real'(a3 - x) / real'(a3 - a2);
  endfunction

  function automatic void ref_fuzzify(int x, in_mf_t p, output int mu [3]);
    mu[0] = ref_mf(x, p.nb_a0, p.nb_a1, p.nb_a2, p.nb_a3);
    mu[1] = ref_mf(x, p.z_b0, p.z_b1, p.z_b1, p.z_b2);
    mu[2] = ref_mf(x, p.pb_a0, p.pb_a1, p.pb_a2, p.pb_a3);
  endfunction

  function automatic int term_index(term_e t);
    case (t)
      T_NEG:  return 0;
      T_ZERO: return 1;
      T_POS:  return 2;
      default: return -1;
    endcase
  endfunction

  // Output of the complete controller for one input pair.
  function automatic int ref_flc(int x1, int x2, in_mf_t p1, in_mf_t p2,
                                 out_heights_t h, rule_table_t rules,
                                 output bit none);
    int m1 [3], m2 [3];
    int agg [3];
    int hh [3];
    int num, den, s, ti;
    ref_fuzzify(x1, p1, m1);
    ref_fuzzify(x2, p2, m2);
    agg = '{0, 0, 0};
    foreach (rules[i, j]) begin
      s  = (m1[i] < m2[j]) ? m1[i] : m2[j];
      ti = term_index(rules[i][j]);
      if (ti >= 0 && s > agg[ti]) agg[ti] = s;
    end
    hh  = '{int'(h.bd), int'(h.h), int'(h.bi)};
    num = 0;
    den = 0;
    for (int t = 0; t < 3; t++) begin
      num += hh[t] * agg[t];
      den += agg[t];
    end
    none = (den == 0);
    return none ? int'(h.h) : num / den;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic in_mf_t ref_expand(gene_t g);
    in_mf_t p;
    int a2, a1;
    a2 = clampi(g.a2, 1, 127);
    a1 = clampi(g.a1, 129, 254);
    p = '{nb_a0: 0, nb_a1: 0, nb_a2: 8'(a2), nb_a3: 128,
          z_b0: 8'(a2), z_b1: 128, z_b2: 8'(a1),
          pb_a0: 128, pb_a1: 8'(a1), pb_a2: 255, pb_a3: 255};
    return p;
  endfunction

  function automatic out_heights_t ref_heights(gene_t g);
    out_heights_t h;
    h.bd = 8'(clampi(g.a2, 1, 127) / 2);
    h.h  = 128;
    h.bi = 8'((clampi(g.a1, 129, 254) + 255) / 2);
    return h;
  endfunction

  // Random valid parameter set of one input variable (ordered points).
  function automatic in_mf_t rand_params();
    gene_t g;
    g.a2 = 8'(1 + $urandom_range(126));
    g.b1 = 128;
    g.a1 = 8'(129 + $urandom_range(125));
    return ref_expand(g);
  endfunction

  // floor(a / 2^n) for signed a.
  function automatic longint floor_shift(longint a, int n);
    longint d;
    d = longint'(1) << n;
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

endpackage
