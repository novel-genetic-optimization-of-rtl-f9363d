// tb_chromosome_decoder: random chromosomes, in and out of the gene ranges;
// checks all 22 input points, the three output heights and the flag that
// reports a clamped or replaced gene.
module tb_chromosome_decoder;
  import fuzzy_pkg::*;
  import flc_ref_pkg::*;

  chromosome_t  chrom;
  in_mf_t       p1, p2;
  out_heights_t h;
  logic         gene_fixed;
  int           checks = 0, failures = 0, fixed_seen = 0, clean_seen = 0;

  chromosome_decoder dut (.chrom(chrom), .p1(p1), .p2(p2), .heights(h), .gene_fixed(gene_fixed));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_range(gene_t g);
    return g.a2 >= 1 && g.a2 <= 127 && g.a1 >= 129 && g.a1 <= 254 && g.b1 == 128;
  endfunction

  function automatic gene_t rgene(bit wild);
    gene_t g;
    if (wild) begin
      g.a2 = 8'($urandom); g.b1 = ($urandom_range(1) == 0) ? 8'd128 : 8'($urandom); g.a1 = 8'($urandom);
    end else begin
      g.a2 = 8'($urandom_range(1, 127)); g.b1 = 128; g.a1 = 8'($urandom_range(129, 254));
    end
    return g;
  endfunction

  initial begin
    bit efix;
    for (int n = 0; n < 5000; n++) begin
      chrom.in1  = rgene(n % 3 == 0);
      chrom.in2  = rgene(n % 5 == 0);
      chrom.outv = rgene(n % 7 == 0);
      #1;
      efix = !(in_range(chrom.in1) && in_range(chrom.in2) && in_range(chrom.outv));
      checks++;
      if (p1 != ref_expand(chrom.in1) || p2 != ref_expand(chrom.in2) ||
          h != ref_heights(chrom.outv) || gene_fixed != efix) begin
        failures++;
        if (failures < 10) $display("FAIL chrom=%h p1=%h p2=%h h=%h fix=%0d", chrom, p1, p2, h, gene_fixed);
      end
      if (efix) fixed_seen++; else clean_seen++;
    end
    checks++;
    if (fixed_seen == 0 || clean_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
