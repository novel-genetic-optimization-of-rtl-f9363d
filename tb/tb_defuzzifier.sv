// tb_defuzzifier: feeds random rule results (consequent codes and strengths)
// and random heights to the defuzzifier, and checks the heights-method output
// (max aggregation per term, weighted mean, truncated), the no-rule case
// (Hold height), and that y_valid comes exactly 8 clocks after start.
module tb_defuzzifier;
  import fuzzy_pkg::*;

  logic         clk = 0, rst = 1, start = 0;
  term_e        c  [NRULES];
  u8_t          gc [NRULES];
  out_heights_t h;
  logic         busy, y_valid, no_rule;
  u8_t          y;
  int           checks = 0, failures = 0, no_rule_seen = 0;

  defuzzifier dut (.clk(clk), .rst(rst), .start(start), .c(c), .grado_c(gc), .heights(h),
                   .busy(busy), .y_valid(y_valid), .y(y), .no_rule(no_rule));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    term_e codes [4];
    int agg [3];
    int num, den, ey, lat;
    bit enone;
    codes = '{T_NONE, T_NEG, T_ZERO, T_POS};
    for (int k = 0; k < NRULES; k++) begin c[k] = T_NONE; gc[k] = 0; end
    h = '{bd: 20, h: 128, bi: 230};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      h.bd = 8'($urandom_range(255));
      h.h  = 8'($urandom_range(255));
      h.bi = 8'($urandom_range(255));
      agg = '{0, 0, 0};
      for (int k = 0; k < NRULES; k++) begin
        if (n % 50 == 7) begin
          c[k] = T_NONE; gc[k] = 0;                // no rule fires
        end else begin
          c[k]  = codes[$urandom_range(3)];
          gc[k] = (c[k] == T_NONE) ? 8'd0 : 8'($urandom_range(255));
        end
        case (c[k])
          T_NEG:  if (gc[k] > agg[0]) agg[0] = gc[k];
          T_ZERO: if (gc[k] > agg[1]) agg[1] = gc[k];
          T_POS:  if (gc[k] > agg[2]) agg[2] = gc[k];
          default: ;
        endcase
      end
      num = h.bd * agg[0] + h.h * agg[1] + h.bi * agg[2];
      den = agg[0] + agg[1] + agg[2];
      enone = (den == 0);
      ey = enone ? int'(h.h) : num / den;
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!y_valid && lat < 50);
      checks++;
      if (int'(y) != ey || no_rule != enone || lat != 8) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d exp=%0d no_rule=%0d lat=%0d", y, ey, no_rule, lat);
      end
      if (no_rule) no_rule_seen++;
      @(posedge clk);
    end
    checks++;
    if (no_rule_seen == 0) begin failures++; $display("FAIL no-rule case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
