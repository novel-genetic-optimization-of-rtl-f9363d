// chromosome_decoder: expands the nine-gene chromosome into the full
// membership-function parameter set of the controller.
//
// Each variable (input 1, input 2, output) carries three genes a2, b1, a1 and
// all eleven points of its three sets are derived from them:
//   NB / BD trapezoid : (0, 0, a2, b1)
//   Z  / H  triangle  : (a2, b1, a1)
//   PB / BI trapezoid : (b1, a1, 255, 255)
// so the sets overlap pairwise and every input value belongs to at least one
// of them. The free genes are limited to the ranges 0 < a2 < 128 and
// 128 < a1 < 255, and b1 is the fixed centre 128; a gene outside its range is
// clamped (a2, a1) or replaced (b1), and gene_fixed reports that this
// happened.
//
// For the output variable the defuzzifier needs one height per term. Each
// height is the centre of the region where that set is at full membership:
// BD = a2/2 (plateau 0..a2), H = b1, BI = (a1+255)/2 (plateau a1..255).
//
// Combinational. The gene layout, the derived point positions and the gene
// ranges follow the description of the chromosome; the clamping and the
// choice of plateau centres as heights are this design's own.
module chromosome_decoder
  import fuzzy_pkg::*;
(
  input  chromosome_t  chrom,
  output in_mf_t       p1,
  output in_mf_t       p2,
  output out_heights_t heights,
  output logic         gene_fixed
);

  localparam u8_t A2_MIN = 8'd1,   A2_MAX = 8'd127;
  localparam u8_t A1_MIN = 8'd129, A1_MAX = 8'd254;

  function automatic u8_t clamp(u8_t v, u8_t lo, u8_t hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic logic out_of_range(gene_t g);
    return (g.a2 < A2_MIN) || (g.a2 > A2_MAX) || (g.a1 < A1_MIN) || (g.a1 > A1_MAX)
        || (g.b1 != CENTRE);
  endfunction

  function automatic in_mf_t expand(u8_t a2_gene, u8_t a1_gene);
    in_mf_t p;
    u8_t a2, a1;
    a2 = clamp(a2_gene, A2_MIN, A2_MAX);
    a1 = clamp(a1_gene, A1_MIN, A1_MAX);
    p.nb_a0 = 8'd0;   p.nb_a1 = 8'd0;  p.nb_a2 = a2;      p.nb_a3 = CENTRE;
    p.z_b0  = a2;     p.z_b1  = CENTRE; p.z_b2 = a1;
    p.pb_a0 = CENTRE; p.pb_a1 = a1;    p.pb_a2 = MU_MAX;  p.pb_a3 = MU_MAX;
    return p;
  endfunction

  u8_t         out_a2, out_a1;

  always_comb begin
    p1 = expand(chrom.in1.a2, chrom.in1.a1);
    p2 = expand(chrom.in2.a2, chrom.in2.a1);
    out_a2 = clamp(chrom.outv.a2, A2_MIN, A2_MAX);
    out_a1 = clamp(chrom.outv.a1, A1_MIN, A1_MAX);
    heights.bd = out_a2 >> 1;
    heights.h  = CENTRE;
    heights.bi = out_a1 + ((MU_MAX - out_a1) >> 1);   // floor((a1 + 255) / 2)
    gene_fixed = out_of_range(chrom.in1) || out_of_range(chrom.in2) || out_of_range(chrom.outv);
  end

endmodule
