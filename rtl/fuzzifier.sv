// fuzzifier: fuzzification of one 8-bit controller input into its three
// linguistic terms NB (left trapezoid), Z (triangle) and PB (right trapezoid).
//
// Three mf_unit instances evaluate the terms in parallel from the eleven
// membership-function points of the variable. For each term the block gives
// its degree (grado) and its linguistic value (v_ling): the term code when
// the degree is above zero, T_NONE otherwise, so that the inference stage only
// forms rules from active terms. Index 0 is NB, 1 is Z, 2 is PB.
//
// Interface: x and the parameter struct in, degrees and term codes out.
// Combinational. The three-term layout and the degree/linguistic-value pair of
// outputs follow the block diagram of the controller; the T_NONE encoding of
// an inactive term is this design's own choice.
module fuzzifier
  import fuzzy_pkg::*;
(
  input  u8_t    x,
  input  in_mf_t p,
  output u8_t    grado  [NTERMS],
  output term_e  v_ling [NTERMS]
);

  mf_unit u_nb (.x(x), .a0(p.nb_a0), .a1(p.nb_a1), .a2(p.nb_a2), .a3(p.nb_a3), .mu(grado[0]));
  mf_unit u_z  (.x(x), .a0(p.z_b0),  .a1(p.z_b1),  .a2(p.z_b1),  .a3(p.z_b2),  .mu(grado[1]));
  mf_unit u_pb (.x(x), .a0(p.pb_a0), .a1(p.pb_a1), .a2(p.pb_a2), .a3(p.pb_a3), .mu(grado[2]));

  always_comb begin
    v_ling[0] = (grado[0] != '0) ? T_NEG  : T_NONE;
    v_ling[1] = (grado[1] != '0) ? T_ZERO : T_NONE;
    v_ling[2] = (grado[2] != '0) ? T_POS  : T_NONE;
  end

endmodule
