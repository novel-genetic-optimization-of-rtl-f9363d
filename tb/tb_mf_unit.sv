// tb_mf_unit: checks one membership-function unit over the whole 8-bit input
// range for many random trapezoids and triangles, including vertical flanks
// at both ends of the universe. Each degree is compared exactly with the
// slope-method reference and must lie within 2 counts of the ideal value.
module tb_mf_unit;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  u8_t x, a0, a1, a2, a3, mu;
  int  checks = 0, failures = 0;

  mf_unit dut (.x(x), .a0(a0), .a1(a1), .a2(a2), .a3(a3), .mu(mu));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(int p0, int p1, int p2, int p3);
    int exp_mu;
    real id;
    a0 = 8'(p0); a1 = 8'(p1); a2 = 8'(p2); a3 = 8'(p3);
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      #1;
      exp_mu = ref_mf(xi, p0, p1, p2, p3);
      id     = ideal_mf(xi, p0, p1, p2, p3);
      checks++;
      if (int'(mu) != exp_mu || real'(mu) > id + 0.001 || real'(mu) < id - 2.0) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d pts=(%0d %0d %0d %0d) mu=%0d exp=%0d ideal=%f",
                   xi, p0, p1, p2, p3, mu, exp_mu, id);
      end
    end
  endtask

  initial begin
    int p [4];
    sweep(0, 0, 64, 128);       // left shoulder, as NB
    sweep(64, 128, 128, 192);   // triangle, as Z
    sweep(128, 192, 255, 255);  // right shoulder, as PB
    sweep(10, 11, 11, 12);      // steepest flanks
    sweep(0, 255, 255, 255);    // shallowest flank
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 4; k++) p[k] = $urandom_range(255);
      p.sort();
      sweep(p[0], p[1], p[2], p[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
