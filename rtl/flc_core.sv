// flc_core: the two-input, one-output fuzzy logic controller.
//
// Input 1 is the error e(t), input 2 the change of error e'(t), both already
// scaled to 8 bits with 128 as zero; the output is an 8-bit control value with
// 128 as "hold". Two fuzzifiers (eleven membership-function points each)
// feed a nine-rule min inference, and a defuzzifier aggregates the rules per
// output term with max and computes the heights-method output from the three
// heights BD, H and BI.
//
// Pipeline: the fuzzifier results are registered (stage 1), the rule results
// are registered (stage 2), then the sequential defuzzifier runs. A sample is
// accepted when in_valid and in_ready are both high; y_valid pulses with y
// exactly LATENCY = 10 clocks after that cycle. in_ready is low while a sample
// is in flight, so one sample is processed at a time. Reset is synchronous and
// active high.
//
// The stage structure (fuzzification, inference, defuzzification), the ports
// (reset, two inputs, eleven points per input, BD/H/BI, one output) and the
// 8-bit sizes follow the block diagram of the controller; the pipeline
// registers and the valid/ready handshake are this design's own choices.
module flc_core
  import fuzzy_pkg::*;
#(
  parameter rule_table_t RULES = DEFAULT_RULES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  u8_t          x1,
  input  u8_t          x2,
  input  in_mf_t       p1,
  input  in_mf_t       p2,
  input  out_heights_t heights,
  output logic         y_valid,
  output u8_t          y,
  output logic         no_rule
);

  // Fuzzification (combinational) and stage-1 registers.
  u8_t   g1_c [NTERMS], g2_c [NTERMS];
  term_e v1_c [NTERMS], v2_c [NTERMS];

  fuzzifier u_fz1 (.x(x1), .p(p1), .grado(g1_c), .v_ling(v1_c));
  fuzzifier u_fz2 (.x(x2), .p(p2), .grado(g2_c), .v_ling(v2_c));

  logic  s1_v;
  u8_t   g1 [NTERMS], g2 [NTERMS];
  term_e v1 [NTERMS], v2 [NTERMS];

  // Inference (combinational) and stage-2 registers.
  term_e c_c  [NRULES];
  u8_t   gc_c [NRULES];

  rule_inference #(.RULES(RULES)) u_inf (
    .grado_in1(g1), .v_ling_in1(v1), .grado_in2(g2), .v_ling_in2(v2),
    .c(c_c), .grado_c(gc_c)
  );

  logic  s2_v;
  term_e c  [NRULES];
  u8_t   gc [NRULES];

  logic dz_busy;

  defuzzifier u_dz (
    .clk(clk), .rst(rst), .start(s2_v), .c(c), .grado_c(gc), .heights(heights),
    .busy(dz_busy), .y_valid(y_valid), .y(y), .no_rule(no_rule)
  );

  assign in_ready = !(s1_v || s2_v || dz_busy);

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
      for (int t = 0; t < NTERMS; t++) begin
        g1[t] <= '0;  g2[t] <= '0;
        v1[t] <= T_NONE;  v2[t] <= T_NONE;
      end
      for (int k = 0; k < NRULES; k++) begin
        c[k]  <= T_NONE;
        gc[k] <= '0;
      end
    end else begin
      s1_v <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        g1 <= g1_c;  g2 <= g2_c;
        v1 <= v1_c;  v2 <= v2_c;
      end
      s2_v <= s1_v;
      if (s1_v) begin
        c  <= c_c;
        gc <= gc_c;
      end
    end
  end

endmodule
