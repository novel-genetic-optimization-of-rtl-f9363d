// tb_flc_core: the complete fuzzy controller against the reference. Random
// parameter sets of the chromosome form and random input pairs, plus a sweep
// of the full 256 x 256 input plane for one parameter set; a final case
// with sets that leave a gap in the universe makes no rule fire. Checks each
// output value and that y_valid comes exactly 10 clocks after the accepted
// sample, and that in_ready is low while a sample is in flight.
module tb_flc_core;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  logic         clk = 0, rst = 1, in_valid = 0;
  logic         in_ready, y_valid, no_rule;
  u8_t          x1, x2, y;
  in_mf_t       p1, p2;
  out_heights_t h;
  int           checks = 0, failures = 0, no_rule_seen = 0;

  flc_core dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                .x1(x1), .x2(x2), .p1(p1), .p2(p2), .heights(h),
                .y_valid(y_valid), .y(y), .no_rule(no_rule));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int a, int b);
    int ey, lat;
    bit enone;
    bit busy_ok;
    x1 = 8'(a); x2 = 8'(b);
    ey = ref_flc(a, b, p1, p2, h, DEFAULT_RULES, enone);
    while (!in_ready) @(posedge clk);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    lat = 0;
    busy_ok = 1;
    do begin
      @(posedge clk);
      #1;
      lat++;
      if (!y_valid && in_ready) busy_ok = 0;
    end while (!y_valid && lat < 50);
    checks++;
    if (int'(y) != ey || no_rule != enone || lat != 10 || !busy_ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL x1=%0d x2=%0d y=%0d exp=%0d no_rule=%0d lat=%0d ready_ok=%0d", a, b, y, ey, no_rule, lat, busy_ok);
    end
    if (no_rule) no_rule_seen++;
  endtask

  initial begin
    p1 = rand_params(); p2 = rand_params();
    h  = '{bd: 30, h: 128, bi: 220};
    x1 = 128; x2 = 128;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      if (n % 20 == 0) begin
        p1 = rand_params(); p2 = rand_params();
        h  = '{bd: 8'($urandom_range(127)), h: 8'($urandom_range(100, 156)), bi: 8'($urandom_range(128, 255))};
      end
      run_one($urandom_range(255), $urandom_range(255));
    end
    p1 = ref_expand('{a2: 56, b1: 128, a1: 200});
    p2 = ref_expand('{a2: 90, b1: 128, a1: 170});
    h  = '{bd: 10, h: 128, bi: 220};
    for (int a = 0; a < 256; a += 3)
      for (int b = 0; b < 256; b += 5)
        run_one(a, b);
    // Sets with a gap between NB and Z: an input of 40 belongs to no set.
    p1 = '{nb_a0: 0, nb_a1: 0, nb_a2: 10, nb_a3: 20, z_b0: 60, z_b1: 128, z_b2: 200,
           pb_a0: 128, pb_a1: 200, pb_a2: 255, pb_a3: 255};
    run_one(40, 128);
    checks++;
    if (no_rule_seen == 0) begin failures++; $display("FAIL no-rule case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
