// fuzzy_speed_ctrl: incremental PD fuzzy speed controller for a DC motor.
//
// Each control period the controller takes the speed reference r and the
// measured speed y_meas, forms the error e = r - y_meas and the change of
// error de = e - e_prev, scales both to the 8-bit universes of the fuzzy
// controller (128 = zero), and runs the fuzzy controller. Its 8-bit output Y
// is read as a signed increment in [-1, 1), multiplied by the gain K and added
// to the control signal u, which is held between periods (the incremental,
// accumulating output of a PD-type fuzzy controller). The membership
// functions come from a nine-gene chromosome through chromosome_decoder, so a
// tuner can change the controller by rewriting nine bytes.
//
// Number formats: r, y_meas and u are signed 16-bit fixed point with 8
// fraction bits. Scaling: x1 = 128 + round(e * GAIN_E / 2^16), x2 = 128 +
// round(de * GAIN_DE / 2^16) (halves rounded up), both limited to 0..255; with the defaults an
// error of +-40 and a change of error of +-10 span the universes. Output:
// u += floor((Y - 128) * K_Q / 2^7), K_Q being K with 8 fraction bits,
// limited to the 16-bit range. e_prev is 0 after reset.
//
// Timing: a period starts when sample is high while ready is high; u_valid
// pulses with the new u 12 clocks later and ready returns high with it. Reset
// is synchronous and active high and clears u and e_prev.
//
// The loop structure (error, change of error, fuzzy controller, gain K, sum
// with a one-period delay), the equations for e and de, and the three
// controller stages follow the description. Fixed-point formats, gains,
// saturation and the sample/ready handshake are this design's own choices.
module fuzzy_speed_ctrl
  import fuzzy_pkg::*;
#(
  parameter int unsigned SW      = 16,    // width of r, y_meas, u
  parameter int unsigned GAIN_E  = 819,   // 128/40 * 256
  parameter int unsigned GAIN_DE = 3277,  // 128/10 * 256
  parameter int unsigned K_Q     = 256,   // K = 1.0
  parameter rule_table_t RULES   = DEFAULT_RULES
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sample,
  output logic                 ready,
  input  logic signed [SW-1:0] r,
  input  logic signed [SW-1:0] y_meas,
  input  chromosome_t          chrom,
  output logic signed [SW-1:0] u,
  output logic                 u_valid,
  // observation of the controller
  output u8_t                  x1,
  output u8_t                  x2,
  output u8_t                  flc_y,
  output logic                 in_sat,
  output logic                 u_sat,
  output logic                 no_rule,
  output logic                 gene_fixed
);

  localparam int unsigned PW = SW + 2 + 18;   // product width

  typedef logic signed [SW+1:0] diff_t;

  function automatic u8_t scale(diff_t v, logic [16:0] gain, output logic sat);
    logic signed [PW-1:0] prod;
    logic signed [PW-1:0] shifted;
    prod    = PW'(v) * $signed({1'b0, gain});
    shifted = ((prod + PW'(signed'(32768))) >>> 16) + PW'(signed'(128));   // rounded
    sat     = 1'b0;
    if (shifted < 0) begin
      sat = 1'b1;
      return 8'd0;
    end
    if (shifted > 255) begin
      sat = 1'b1;
      return 8'd255;
    end
    return shifted[7:0];
  endfunction

  // Membership functions from the chromosome.
  in_mf_t       p1, p2;
  out_heights_t heights;

  chromosome_decoder u_dec (
    .chrom(chrom), .p1(p1), .p2(p2), .heights(heights), .gene_fixed(gene_fixed)
  );

  // Error and change of error.
  diff_t e, de, e_prev;
  logic  sat1, sat2;
  u8_t   x1_c, x2_c;

  always_comb begin
    e    = diff_t'(r) - diff_t'(y_meas);
    de   = e - e_prev;
    x1_c = scale(e, 17'(GAIN_E), sat1);
    x2_c = scale(de, 17'(GAIN_DE), sat2);
  end

  // Fuzzy controller.
  logic flc_valid_in, flc_ready, flc_y_valid;

  flc_core #(.RULES(RULES)) u_flc (
    .clk(clk), .rst(rst), .in_valid(flc_valid_in), .in_ready(flc_ready),
    .x1(x1), .x2(x2), .p1(p1), .p2(p2), .heights(heights),
    .y_valid(flc_y_valid), .y(flc_y), .no_rule(no_rule)
  );

  // Gain K and accumulation of the increment.
  localparam logic signed [SW+12:0] U_MAX = (SW+13)'((1 <<< (SW-1)) - 1);
  localparam logic signed [SW+12:0] U_MIN = -(SW+13)'(1 <<< (SW-1));

  logic signed [SW+12:0] du, u_next;

  always_comb begin
    du     = ((SW+13)'($signed({1'b0, flc_y}) - 10'sd128) * $signed({1'b0, 12'(K_Q)})) >>> 7;
    u_next = (SW+13)'(u) + du;
  end

  logic busy;
  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy         <= 1'b0;
      flc_valid_in <= 1'b0;
      e_prev       <= '0;
      x1           <= CENTRE;
      x2           <= CENTRE;
      in_sat       <= 1'b0;
      u            <= '0;
      u_valid      <= 1'b0;
      u_sat        <= 1'b0;
    end else begin
      u_valid <= 1'b0;
      if (flc_valid_in && flc_ready) flc_valid_in <= 1'b0;
      if (!busy && sample) begin
        busy         <= 1'b1;
        x1           <= x1_c;
        x2           <= x2_c;
        in_sat       <= sat1 || sat2;
        e_prev       <= e;
        flc_valid_in <= 1'b1;
      end
      if (busy && flc_y_valid) begin
        busy    <= 1'b0;
        u_valid <= 1'b1;
        if (u_next > U_MAX) begin
          u     <= U_MAX[SW-1:0];
          u_sat <= 1'b1;
        end else if (u_next < U_MIN) begin
          u     <= U_MIN[SW-1:0];
          u_sat <= 1'b1;
        end else begin
          u     <= u_next[SW-1:0];
          u_sat <= 1'b0;
        end
      end
    end
  end

endmodule
