// fuzzy_pkg: types and constants shared by the fuzzy speed controller.
//
// Every input and output universe of the controller is an unsigned 8-bit
// number (0..255); the value 128 stands for zero error, zero change of error
// and "hold" on the output. Membership degrees are also 8 bits, 255 meaning
// full membership. Each variable has three linguistic terms: a left
// trapezoid, a centre triangle and a right trapezoid (NB, Z, PB on the inputs;
// BD, H, BI on the output). These sizes and the term layout follow the
// design description; the encodings below are this design's own choice.
package fuzzy_pkg;

  localparam int unsigned W      = 8;    // width of every universe and degree
  localparam int unsigned NTERMS = 3;    // linguistic terms per variable
  localparam int unsigned NRULES = NTERMS * NTERMS;
  localparam logic [W-1:0] MU_MAX = 8'd255;
  localparam logic [W-1:0] CENTRE = 8'd128; // b1, fixed centre of every universe

  typedef logic [W-1:0] u8_t;

  // Linguistic term code. T_NEG is NB (inputs) or BD (output), T_ZERO is Z or
  // H, T_POS is PB or BI. T_NONE marks a term whose degree is zero, or a rule
  // that does not fire.
  typedef enum logic [1:0] {
    T_NONE = 2'd0,
    T_NEG  = 2'd1,
    T_ZERO = 2'd2,
    T_POS  = 2'd3
  } term_e;

  // The eleven membership-function points of one input variable: two
  // trapezoids of four points each and a triangle of three points.
  typedef struct packed {
    u8_t nb_a0, nb_a1, nb_a2, nb_a3;
    u8_t z_b0,  z_b1,  z_b2;
    u8_t pb_a0, pb_a1, pb_a2, pb_a3;
  } in_mf_t;

  // Output heights used by the heights defuzzification method.
  typedef struct packed {
    u8_t bd, h, bi;
  } out_heights_t;

  // One variable's part of the chromosome: three genes a2, b1, a1.
  typedef struct packed {
    u8_t a2, b1, a1;
  } gene_t;

  // The nine-gene chromosome: input 1, input 2, output, in that order.
  typedef struct packed {
    gene_t in1, in2, outv;
  } chromosome_t;

  // Rule table: consequent term for (input-1 term, input-2 term), each index
  // 0 = NB, 1 = Z, 2 = PB.
  typedef term_e rule_table_t [NTERMS][NTERMS];

  // Default rule base of an incremental PD controller (own choice: the rules
  // themselves are not listed in the description, only that they stay fixed).
  localparam rule_table_t DEFAULT_RULES = '{
    '{T_NEG,  T_NEG,  T_ZERO},   // e = NB : de = NB, Z, PB
    '{T_NEG,  T_ZERO, T_POS },   // e = Z
    '{T_ZERO, T_POS,  T_POS }    // e = PB
  };

endpackage
