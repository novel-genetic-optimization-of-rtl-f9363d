// rule_inference: the rule stage of the max-min inference for two inputs with
// three terms each, i.e. nine rules "if e is A and de is B then y is C".
//
// Rule k = 3*i + j combines term i of input 1 with term j of input 2. It fires
// when both terms are active; its strength grado_c[k] is then the minimum of
// the two degrees (the "min" of max-min) and its consequent c[k] is taken
// from the rule table RULES. A rule that does not fire gives c = T_NONE and a
// strength of 0. The "max" half of max-min, the aggregation of rules with the
// same consequent, is done at the input of the defuzzifier.
//
// Interface: degrees and term codes of both inputs in, nine consequents and
// nine strengths out. Combinational. The nine rule outputs c1..c9 and
// grado_c1..grado_c9 follow the block diagram of the controller; the default
// rule table is this design's own choice, as the rules are not listed.
module rule_inference
  import fuzzy_pkg::*;
#(
  parameter rule_table_t RULES = DEFAULT_RULES
) (
  input  u8_t   grado_in1  [NTERMS],
  input  term_e v_ling_in1 [NTERMS],
  input  u8_t   grado_in2  [NTERMS],
  input  term_e v_ling_in2 [NTERMS],
  output term_e c          [NRULES],
  output u8_t   grado_c    [NRULES]
);

  always_comb begin
    for (int i = 0; i < NTERMS; i++) begin
      for (int j = 0; j < NTERMS; j++) begin
        if (v_ling_in1[i] != T_NONE && v_ling_in2[j] != T_NONE) begin
          c[NTERMS*i + j]       = RULES[i][j];
          grado_c[NTERMS*i + j] = (grado_in1[i] < grado_in2[j]) ? grado_in1[i] : grado_in2[j];
        end else begin
          c[NTERMS*i + j]       = T_NONE;
          grado_c[NTERMS*i + j] = '0;
        end
      end
    end
  end

endmodule
