// rgb2hsl: pipelined RGB to HSL colour space converter (8 bits per channel).
//
// Computes, for MAX/MIN the largest/smallest of R, G, B and delta = MAX - MIN:
//   L = MAX/2 + MIN/2   (each halved first so the sum fits in 8 bits)
//   S = 127 * delta / L          if L <= 127
//       127 * delta / (255 - L)  if L >  127,      S = 0   for a grey pixel
//   H = 42 + 42 * (G - B) / delta   if R is largest
//       126 + 42 * (B - R) / delta  if G is largest
//       210 + 42 * (R - G) / delta  if B is largest,   H = 255 for a grey pixel
// Hue is rotated by 60 degrees and scaled so 60 degrees = 42 codes: reds
// fall in 0..84, greens in 84..168, blues in 168..252.
//
// Pipeline (one pixel per cycle, latency 5 cycles without back-pressure):
//   1 Pre-Calc     max/min, delta, L, brightest channel code
//   2 Selectors    saturation numerator/denominator; hue numerator/denominator
//                  and a subtract flag that keeps every value unsigned
//   3-4 Divisors   two lut_divider instances compute Q8.8 quotients
//                  (delta<<8)/den_s and (|diff|<<8)/delta; the hue divider
//                  carries L, the channel code, the subtract flag and the grey
//                  flag through its pipeline as a tag
//   5 Hue Offset / Saturation Shifter
//                  hue = offset +/- round(42 * hue_q / 256)
//                  sat = round(sat_q / 2)   (Q8.8 -> the 127/255 scale)
// This staging, the unsigned hue selection and the rounding steps follow the
// published algorithm. Two corner cases are this design's own: a saturation
// quotient of 2.0 or more (fully saturated primaries such as 255,0,0 give
// 514/256) is clamped to 255 instead of wrapping, and L = 0 with delta > 0
// (a pixel such as 1,0,0) divides by zero, which the divider answers with its
// largest quotient, so S = 255.
//
// Interface: EyeLink streams. in_rts/in_rgb/in_ack on the input side,
// out_rts/out_hsl/out_ack on the output side; a word moves when rts and ack
// are both high. The whole pipeline advances when the output register is
// empty or being taken, so in_ack = !out_rts | out_ack.
module rgb2hsl
  import ev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // input stream
  input  logic in_rts,
  output logic in_ack,
  input  rgb_t in_rgb,
  // output stream
  output logic out_rts,
  input  logic out_ack,
  output hsl_t out_hsl
);
  logic adv;
  assign adv    = !out_rts || out_ack;
  assign in_ack = adv;

  // ---------------------------------------------------------- 1: Pre-Calc
  logic [7:0] mx, mn;
  max_chan_e  mch;

  always_comb begin
    mx = in_rgb.r;
    if (in_rgb.g > mx) mx = in_rgb.g;
    if (in_rgb.b > mx) mx = in_rgb.b;
    mn = in_rgb.r;
    if (in_rgb.g < mn) mn = in_rgb.g;
    if (in_rgb.b < mn) mn = in_rgb.b;
    if (mx == in_rgb.r)      mch = MAXCH_R;
    else if (mx == in_rgb.g) mch = MAXCH_G;
    else                     mch = MAXCH_B;
  end

  logic       v1;
  rgb_t       rgb1;
  max_chan_e  mch1;
  logic [7:0] delta1, lum1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      rgb1   <= '0;
      mch1   <= MAXCH_R;
      delta1 <= '0;
      lum1   <= '0;
    end else if (adv) begin
      v1     <= in_rts;
      rgb1   <= in_rgb;
      mch1   <= mch;
      delta1 <= mx - mn;
      lum1   <= (mx >> 1) + (mn >> 1);
    end
  end

  // --------------------------------------------------------- 2: Selectors
  logic [7:0] sden_c, hdiff_c;
  logic       hsub_c;

  always_comb begin
    // Saturation Selector
    sden_c = (lum1 <= 8'd127) ? lum1 : 8'd255 - lum1;
    // Hue Selector
    unique case (mch1)
      MAXCH_R: begin
        hsub_c  = !(rgb1.g > rgb1.b);
        hdiff_c = hsub_c ? rgb1.b - rgb1.g : rgb1.g - rgb1.b;
      end
      MAXCH_G: begin
        hsub_c  = !(rgb1.b > rgb1.r);
        hdiff_c = hsub_c ? rgb1.r - rgb1.b : rgb1.b - rgb1.r;
      end
      default: begin
        hsub_c  = !(rgb1.r > rgb1.g);
        hdiff_c = hsub_c ? rgb1.g - rgb1.r : rgb1.r - rgb1.g;
      end
    endcase
  end

  typedef struct packed {
    logic       grey;
    logic       hsub;
    max_chan_e  mch;
    logic [7:0] lum;
  } hsl_tag_t;

  logic        v2;
  logic [15:0] snum2, hnum2;
  logic [7:0]  sden2, hden2;
  hsl_tag_t    tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      snum2 <= '0;
      sden2 <= '0;
      hnum2 <= '0;
      hden2 <= '0;
      tag2  <= '0;
    end else if (adv) begin
      v2        <= v1;
      snum2     <= {delta1, 8'h00};
      sden2     <= sden_c;
      hnum2     <= {hdiff_c, 8'h00};
      hden2     <= delta1;
      tag2.grey <= (delta1 == 8'd0);
      tag2.hsub <= hsub_c;
      tag2.mch  <= mch1;
      tag2.lum  <= lum1;
    end
  end

  // ------------------------------------------------------- 3-4: Divisors
  logic        v4, sv4_unused, sdz4, hdz4_unused;
  logic [15:0] hq4, sq4;
  hsl_tag_t    tag4;
  logic        stag_unused;

  lut_divider #(.NUM_W(16), .TAG_W($bits(hsl_tag_t))) u_hue_div (
    .clk, .rst_n, .en(adv),
    .in_valid(v2), .num(hnum2), .den(hden2), .tag(tag2),
    .out_valid(v4), .quot(hq4), .out_dz(hdz4_unused), .out_tag(tag4)
  );

  lut_divider #(.NUM_W(16), .TAG_W(1)) u_sat_div (
    .clk, .rst_n, .en(adv),
    .in_valid(v2), .num(snum2), .den(sden2), .tag(1'b0),
    .out_valid(sv4_unused), .quot(sq4), .out_dz(sdz4), .out_tag(stag_unused)
  );

  // ------------------------------- 5: Hue Offset and Saturation Shifter
  logic [23:0] hprod;
  logic [7:0]  hrnd, hoff, hue_c, sat_c;
  logic [8:0]  sat9;

  always_comb begin
    hprod = 24'(hq4) * 24'(HUE_SCALE);             // Q8.8 x Q6.0 = Q14.8
    hrnd  = hprod[15:8] + 8'(hprod[7]);             // round to integer
    unique case (tag4.mch)
      MAXCH_R: hoff = HUE_OFF_R;
      MAXCH_G: hoff = HUE_OFF_G;
      default: hoff = HUE_OFF_B;
    endcase
    if (tag4.grey)      hue_c = HUE_GREY;
    else if (tag4.hsub) hue_c = hoff - hrnd;
    else                hue_c = hoff + hrnd;

    sat9 = {1'b0, sq4[8:1]} + 9'(sq4[0]);           // /2 and round
    if (tag4.grey)                          sat_c = 8'd0;
    else if (sdz4 || sq4[15:9] != '0 || sat9[8]) sat_c = 8'd255;
    else                                    sat_c = sat9[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_rts <= 1'b0;
      out_hsl <= '0;
    end else if (adv) begin
      out_rts   <= v4;
      out_hsl.h <= hue_c;
      out_hsl.s <= sat_c;
      out_hsl.l <= tag4.lum;
    end
  end
endmodule
