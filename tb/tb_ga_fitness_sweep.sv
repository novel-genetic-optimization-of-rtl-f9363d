// tb_ga_fitness_sweep: the evaluation a genetic tuner performs on each
// candidate, run on the controller at its default parameters.
//
// For each of several chromosomes the controller is reset and closed around
// the first-order motor model of tb_fuzzy_speed_ctrl for 1000 control periods
// with a 15 rpm reference step. Each period's u is compared with the
// reference model. The three objectives are then reported:
//   overshoot   o1  = max(w) - r
//   undershoot  o2  = |min(w) - r|, taken after the speed first reaches r
//                     (before that the minimum is just the starting speed)
//   sse             = sum over periods 201..1000 of (w - r)
// The testbench also requires that the objectives differ between
// chromosomes, i.e. that the genes really change the closed-loop response.
module tb_ga_fitness_sweep;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  localparam real ALPHA = 0.05;
  localparam int  GE = 819, GDE = 3277, KQ = 256;
  localparam int  NCAND = 6;

  logic               clk = 0, rst = 1, sample = 0;
  logic               ready, u_valid, in_sat, u_sat, no_rule, gene_fixed;
  logic signed [15:0] r, y_meas, u;
  chromosome_t        chrom;
  u8_t                x1, x2, flc_y;

  fuzzy_speed_ctrl dut (
    .clk(clk), .rst(rst), .sample(sample), .ready(ready), .r(r), .y_meas(y_meas),
    .chrom(chrom), .u(u), .u_valid(u_valid), .x1(x1), .x2(x2), .flc_y(flc_y),
    .in_sat(in_sat), .u_sat(u_sat), .no_rule(no_rule), .gene_fixed(gene_fixed)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_u, ref_eprev;

  function automatic int scale_ref(longint v, int gain);
    longint s;
    s = floor_shift(v * gain + 32768, 16) + 128;
    return (s < 0) ? 0 : (s > 255) ? 255 : int'(s);
  endfunction

  task automatic period(int r_q, int y_q);
    longint e, de, un;
    int ey;
    bit none;
    e   = r_q - y_q;
    de  = e - ref_eprev;
    ey  = ref_flc(scale_ref(e, GE), scale_ref(de, GDE), ref_expand(chrom.in1),
                  ref_expand(chrom.in2), ref_heights(chrom.outv), DEFAULT_RULES, none);
    un  = ref_u + floor_shift(longint'(ey - 128) * KQ, 7);
    un  = (un > 32767) ? 32767 : (un < -32768) ? -32768 : un;
    r = 16'(r_q); y_meas = 16'(y_q);
    while (!ready) @(posedge clk);
    sample <= 1;
    @(posedge clk);
    sample <= 0;
    do @(posedge clk); while (!u_valid);
    checks++;
    if (longint'(u) != un) begin
      failures++;
      if (failures < 10) $display("FAIL u=%0d exp=%0d", u, un);
    end
    ref_u = un;
    ref_eprev = e;
  endtask

  initial begin
    gene_t cand [NCAND][3];
    real w, wmax, wmin, sse, o1, o2;
    real o1s [NCAND], sses [NCAND];
    bit reached, differ;
    cand = '{
      '{'{a2: 64, b1: 128, a1: 192}, '{a2: 64, b1: 128, a1: 192}, '{a2: 16, b1: 128, a1: 240}},
      '{'{a2: 32, b1: 128, a1: 224}, '{a2: 64, b1: 128, a1: 192}, '{a2: 16, b1: 128, a1: 240}},
      '{'{a2: 100, b1: 128, a1: 156}, '{a2: 64, b1: 128, a1: 192}, '{a2: 16, b1: 128, a1: 240}},
      '{'{a2: 64, b1: 128, a1: 192}, '{a2: 110, b1: 128, a1: 146}, '{a2: 16, b1: 128, a1: 240}},
      '{'{a2: 64, b1: 128, a1: 192}, '{a2: 64, b1: 128, a1: 192}, '{a2: 100, b1: 128, a1: 156}},
      '{'{a2: 48, b1: 128, a1: 208}, '{a2: 96, b1: 128, a1: 160}, '{a2: 32, b1: 128, a1: 224}}
    };
    for (int c = 0; c < NCAND; c++) begin
      chrom = '{in1: cand[c][0], in2: cand[c][1], outv: cand[c][2]};
      rst <= 1;
      repeat (3) @(posedge clk);
      rst <= 0;
      @(posedge clk);
      ref_u = 0; ref_eprev = 0;
      w = 0.0; wmax = -1.0e9; wmin = 1.0e9; sse = 0.0; reached = 0;
      for (int t = 1; t <= 1000; t++) begin
        period(15 * 256, int'(w * 256.0));
        w = w + ALPHA * (real'(u) / 256.0 - w);
        if (w > wmax) wmax = w;
        if (w >= 15.0) reached = 1;
        if (reached && w < wmin) wmin = w;
        if (t > 200) sse += (w - 15.0);
      end
      o1 = wmax - 15.0;
      o2 = reached ? ((wmin < 15.0) ? 15.0 - wmin : 0.0) : 15.0 - wmax;
      o1s[c] = o1; sses[c] = sse;
      $display("candidate %0d chrom=%h: final %f rpm  o1=%f  o2=%f  sse=%f", c, chrom, w, o1, o2, sse);
    end
    differ = 0;
    for (int c = 1; c < NCAND; c++)
      if (o1s[c] != o1s[0] || sses[c] != sses[0]) differ = 1;
    checks++;
    if (!differ) begin failures++; $display("FAIL the chromosome had no effect on the response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
