// tb_fuzzy_speed_ctrl: end-to-end test of the incremental PD fuzzy speed
// controller at its default parameters.
//
// Phase 1 closes the loop around a first-order motor model (below) and runs
// 1000 control periods with a speed reference step to 15 rpm. Every new u is
// compared with a reference model of the whole controller; overshoot,
// undershoot and the summed error of periods 201..1000 are reported, and the
// speed must settle near 15 rpm. Phase 2 holds a large error open-loop
// until u saturates, phase 3 a large negative error, and phase 4 loads a
// chromosome with out-of-range genes. Mechanisms counted: input scaling
// saturation, output saturation, positive and negative increments, gene
// clamping. Each must occur at least once. The period latency (12 clocks from
// sample to u_valid) is checked every period.
//
// Motor model (behavioural, not part of the design): speed w in rpm follows
// w[k+1] = w[k] + ALPHA * (GAIN_RPM * u[k] - w[k]), u read as a real number.
module tb_fuzzy_speed_ctrl;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  localparam real ALPHA    = 0.05;
  localparam real GAIN_RPM = 1.0;
  localparam int  GE = 819, GDE = 3277, KQ = 256;   // the design's defaults

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
  int n_in_sat = 0, n_u_sat = 0, n_pos = 0, n_neg = 0, n_gene_fixed = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state of the controller.
  longint ref_u = 0, ref_eprev = 0;

  function automatic int scale_ref(longint v, int gain, output bit sat);
    longint s;
    s = floor_shift(v * gain + 32768, 16) + 128;
    sat = (s < 0) || (s > 255);
    return (s < 0) ? 0 : (s > 255) ? 255 : int'(s);
  endfunction

  task automatic period(int r_q, int y_q);
    longint e, de, du, un;
    int ex1, ex2, ey, lat;
    bit s1, s2, none, esat;
    in_mf_t rp1, rp2;
    out_heights_t rh;
    e   = r_q - y_q;
    de  = e - ref_eprev;
    ex1 = scale_ref(e, GE, s1);
    ex2 = scale_ref(de, GDE, s2);
    rp1 = ref_expand(chrom.in1);
    rp2 = ref_expand(chrom.in2);
    rh  = ref_heights(chrom.outv);
    ey  = ref_flc(ex1, ex2, rp1, rp2, rh, DEFAULT_RULES, none);
    du  = floor_shift(longint'(ey - 128) * KQ, 7);
    un  = ref_u + du;
    esat = (un > 32767) || (un < -32768);
    un  = (un > 32767) ? 32767 : (un < -32768) ? -32768 : un;

    r = 16'(r_q); y_meas = 16'(y_q);
    while (!ready) @(posedge clk);
    sample <= 1;
    @(posedge clk);
    sample <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!u_valid && lat < 100);
    checks++;
    if (longint'(u) != un || int'(x1) != ex1 || int'(x2) != ex2 || int'(flc_y) != ey ||
        in_sat != (s1 || s2) || u_sat != esat || lat != 12) begin
      failures++;
      if (failures < 10)
        $display("FAIL e=%0d de=%0d: x1=%0d/%0d x2=%0d/%0d y=%0d/%0d u=%0d/%0d sat=%0d%0d/%0d%0d lat=%0d",
                 e, de, x1, ex1, x2, ex2, flc_y, ey, u, un, in_sat, u_sat, s1 || s2, esat, lat);
    end
    if (in_sat) n_in_sat++;
    if (u_sat) n_u_sat++;
    if (flc_y > 128) n_pos++;
    if (flc_y < 128) n_neg++;
    if (gene_fixed) n_gene_fixed++;
    ref_u = un;
    ref_eprev = e;
  endtask

  initial begin
    real w, ymax, ymin, sse, wr;
    int  yq;
    chrom = '{in1: '{a2: 64, b1: 128, a1: 192},
              in2: '{a2: 64, b1: 128, a1: 192},
              outv: '{a2: 16, b1: 128, a1: 240}};
    r = 0; y_meas = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // Phase 1: closed loop, reference 15 rpm, 1000 periods.
    w = 0.0; ymax = -1.0e9; ymin = 1.0e9; sse = 0.0;
    for (int t = 1; t <= 1000; t++) begin
      yq = int'(w * 256.0);
      period(15 * 256, yq);
      w = w + ALPHA * (GAIN_RPM * real'(u) / 256.0 - w);
      if (t > 20) begin
        if (w > ymax) ymax = w;
        if (w < ymin) ymin = w;
      end
      if (t > 200) sse += (w - 15.0);
    end
    $display("closed loop: final speed %f rpm, overshoot %f, lowest speed below r after period 20 %f, sse(201..1000) %f",
             w, ymax - 15.0, (ymin < 15.0) ? 15.0 - ymin : 0.0, sse);
    checks++;
    if (w < 14.5 || w > 15.5) begin failures++; $display("FAIL speed did not settle at 15 rpm"); end

    // Phase 2: large positive error until the output saturates.
    for (int t = 0; t < 200; t++) period(100 * 256, -100 * 256);
    // Phase 3: large negative error.
    for (int t = 0; t < 20; t++) period(-100 * 256, 100 * 256);
    // Phase 4: genes outside their ranges are clamped.
    chrom.in1.a2 = 0;
    chrom.outv.a1 = 255;
    for (int t = 0; t < 5; t++) period(5 * 256, 0);

    $display("mechanisms: in_sat=%0d u_sat=%0d pos=%0d neg=%0d gene_fixed=%0d",
             n_in_sat, n_u_sat, n_pos, n_neg, n_gene_fixed);
    checks++;
    if (n_in_sat == 0 || n_u_sat == 0 || n_pos == 0 || n_neg == 0 || n_gene_fixed == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
