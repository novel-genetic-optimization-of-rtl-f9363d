// defuzzifier: aggregation and heights-method defuzzification of the nine
// rule results into one 8-bit output.
//
// For each output term (BD, H, BI) the strongest rule with that consequent
// gives the term's degree mu_t (the "max" of max-min inference). The crisp
// output is the weighted mean of the term heights,
//     y = sum(h_t * mu_t) / sum(mu_t),
// with the heights BD, H and BI given as inputs. The sum of products (18 bits)
// and the sum of degrees (10 bits) are latched on start and divided by a
// restoring divider that settles one quotient bit per clock, most significant
// first. The quotient always fits 8 bits because no height exceeds 255. The
// result is truncated. When no rule fires the output is the Hold height.
//
// Interface and timing: start is sampled when busy is low; busy is high for
// the 8 divide cycles; y_valid pulses for one cycle, 8 clocks after the start
// cycle, with y. Reset is synchronous and active high. The heights formula and
// the BD/H/BI inputs follow the description; the sequential divider, the
// truncation and the no-rule value are this design's own choices.
module defuzzifier
  import fuzzy_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  term_e        c       [NRULES],
  input  u8_t          grado_c [NRULES],
  input  out_heights_t heights,
  output logic         busy,
  output logic         y_valid,
  output u8_t          y,
  output logic         no_rule
);

  localparam int unsigned NUMW = 18;   // 3 * 255 * 255 < 2^18
  localparam int unsigned DENW = 10;   // 3 * 255       < 2^10

  u8_t             mu_t [NTERMS];      // aggregated degree per output term
  logic [NUMW-1:0] num_c;
  logic [DENW-1:0] den_c;

  // Max aggregation and weighted sums.
  always_comb begin
    for (int t = 0; t < NTERMS; t++) mu_t[t] = '0;
    for (int k = 0; k < NRULES; k++) begin
      unique case (c[k])
        T_NEG:   if (grado_c[k] > mu_t[0]) mu_t[0] = grado_c[k];
        T_ZERO:  if (grado_c[k] > mu_t[1]) mu_t[1] = grado_c[k];
        T_POS:   if (grado_c[k] > mu_t[2]) mu_t[2] = grado_c[k];
        default: ;
      endcase
    end
    num_c = NUMW'(heights.bd) * NUMW'(mu_t[0])
          + NUMW'(heights.h)  * NUMW'(mu_t[1])
          + NUMW'(heights.bi) * NUMW'(mu_t[2]);
    den_c = DENW'(mu_t[0]) + DENW'(mu_t[1]) + DENW'(mu_t[2]);
  end

  logic [NUMW-1:0] rem;
  logic [DENW-1:0] den;
  logic [2:0]      bitpos;
  logic [6:0]      q;                 // quotient bits settled so far
  logic [NUMW-1:0] trial;
  logic            take;

  always_comb begin
    trial = NUMW'(den) << bitpos;
    take  = (rem >= trial);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      y_valid <= 1'b0;
      y       <= CENTRE;
      no_rule <= 1'b0;
      rem     <= '0;
      den     <= '0;
      bitpos  <= '0;
      q       <= '0;
    end else begin
      y_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          bitpos  <= 3'd7;
          q       <= '0;
          no_rule <= (den_c == '0);
          if (den_c == '0) begin
            rem <= NUMW'(heights.h);
            den <= DENW'(1);
          end else begin
            rem <= num_c;
            den <= den_c;
          end
        end
      end else begin
        if (take) rem <= rem - trial;
        if (bitpos == 3'd0) begin
          busy    <= 1'b0;
          y_valid <= 1'b1;
          y       <= {q, take};
        end else begin
          q      <= {q[5:0], take};
          bitpos <= bitpos - 3'd1;
        end
      end
    end
  end

endmodule
