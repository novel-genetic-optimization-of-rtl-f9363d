// tb_rule_inference: random degrees and activity codes for both inputs; every
// one of the nine rules must report the table's consequent and the minimum of
// its two degrees when both terms are active, and T_NONE with strength 0
// otherwise. Uses a rule table different from the default to show that the
// table parameter is honoured.
module tb_rule_inference;
  import fuzzy_pkg::*;

  localparam rule_table_t TBL = '{
    '{T_NEG,  T_ZERO, T_POS },
    '{T_POS,  T_NEG,  T_ZERO},
    '{T_ZERO, T_POS,  T_NEG }
  };

  u8_t   g1 [NTERMS], g2 [NTERMS];
  term_e v1 [NTERMS], v2 [NTERMS];
  term_e c  [NRULES];
  u8_t   gc [NRULES];
  int    checks = 0, failures = 0;

  rule_inference #(.RULES(TBL)) dut (
    .grado_in1(g1), .v_ling_in1(v1), .grado_in2(g2), .v_ling_in2(v2), .c(c), .grado_c(gc)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    term_e codes [3];
    term_e ec;
    int    eg;
    codes = '{T_NEG, T_ZERO, T_POS};
    for (int n = 0; n < 3000; n++) begin
      for (int t = 0; t < 3; t++) begin
        g1[t] = ($urandom_range(3) == 0) ? 8'd0 : 8'($urandom_range(1, 255));
        g2[t] = ($urandom_range(3) == 0) ? 8'd0 : 8'($urandom_range(1, 255));
        v1[t] = (g1[t] != 0) ? codes[t] : T_NONE;
        v2[t] = (g2[t] != 0) ? codes[t] : T_NONE;
      end
      #1;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          if (g1[i] != 0 && g2[j] != 0) begin
            ec = TBL[i][j];
            eg = (g1[i] <= g2[j]) ? g1[i] : g2[j];
          end else begin
            ec = T_NONE;
            eg = 0;
          end
          checks++;
          if (c[3*i+j] != ec || int'(gc[3*i+j]) != eg) begin
            failures++;
            if (failures < 10)
              $display("FAIL rule %0d: c=%s exp=%s g=%0d exp=%0d", 3*i+j, c[3*i+j].name(), ec.name(), gc[3*i+j], eg);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
