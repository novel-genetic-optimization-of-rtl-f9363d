// tb_fuzzifier: drives one fuzzifier with random parameter sets of the
// chromosome form and every input value, and checks the three degrees and the
// three linguistic-value codes (term code when the degree is non-zero).
module tb_fuzzifier;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  u8_t    x;
  in_mf_t p;
  u8_t    grado [NTERMS];
  term_e  v_ling [NTERMS];
  int     checks = 0, failures = 0;

  fuzzifier dut (.x(x), .p(p), .grado(grado), .v_ling(v_ling));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mu [3];
    term_e codes [3];
    codes = '{T_NEG, T_ZERO, T_POS};
    for (int n = 0; n < 60; n++) begin
      p = rand_params();
      for (int xi = 0; xi < 256; xi++) begin
        x = 8'(xi);
        #1;
        ref_fuzzify(xi, p, mu);
        for (int t = 0; t < 3; t++) begin
          checks++;
          if (int'(grado[t]) != mu[t] || v_ling[t] != ((mu[t] != 0) ? codes[t] : T_NONE)) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%0d term=%0d grado=%0d exp=%0d v_ling=%s", xi, t, grado[t], mu[t], v_ling[t].name());
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
