// rgb2ycbcr: three-stage pipelined RGB to YCbCr converter (JPEG equations).
//
//   Y  =       0.299    R + 0.587    G + 0.114    B
//   Cb = 128 - 0.168736 R - 0.331264 G + 0.5      B
//   Cr = 128 + 0.5      R - 0.418688 G - 0.081312 B
// The coefficients are fixed point with 17 fraction bits (ev_pkg::YCC_COEF),
// the offset 128 is 128 * 2^17. Each output is rounded by adding bit 16 of
// the accumulator to bits 24:17.
//
// Stage 1 registers the incoming pixel, stage 2 forms the three
// multiply-accumulate sums (nine constant products), stage 3 rounds and
// registers Y, Cb, Cr. Latency is 3 cycles; one pixel is accepted per cycle.
// The stage split and the Q8.17 arithmetic follow the published design.
// Clamping to 255 is this design's own: Cb for pure blue (and Cr for pure
// red) is exactly 255.5, which would round to 256.
//
// Interface: EyeLink streams as in rgb2hsl (in_rts/in_ack/in_rgb,
// out_rts/out_ack/out_ycc); the pipeline advances when the output register is
// empty or being taken, and in_ack = !out_rts | out_ack.
module rgb2ycbcr
  import ev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_rts,
  output logic in_ack,
  input  rgb_t in_rgb,
  output logic out_rts,
  input  logic out_ack,
  output ycc_t out_ycc
);
  localparam int unsigned ACC_W = 28;

  logic adv;
  assign adv    = !out_rts || out_ack;
  assign in_ack = adv;

  // Stage 1: input register.
  logic v1;
  rgb_t rgb1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      rgb1 <= '0;
    end else if (adv) begin
      v1   <= in_rts;
      rgb1 <= in_rgb;
    end
  end

  // Stage 2: multiply-accumulate.
  logic signed [ACC_W-1:0] acc_c [3];
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      acc_c[k] = ACC_W'(YCC_OFFS[k])
               + ACC_W'(YCC_COEF[k][0]) * $signed({1'b0, rgb1.r})
               + ACC_W'(YCC_COEF[k][1]) * $signed({1'b0, rgb1.g})
               + ACC_W'(YCC_COEF[k][2]) * $signed({1'b0, rgb1.b});
    end
  end

  logic                    v2;
  logic signed [ACC_W-1:0] acc2 [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      for (int k = 0; k < 3; k++) acc2[k] <= '0;
    end else if (adv) begin
      v2 <= v1;
      for (int k = 0; k < 3; k++) acc2[k] <= acc_c[k];
    end
  end

  // Stage 3: round, clamp, output register.
  logic [7:0] ch_c [3];
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic [8:0] r9;
      r9 = {1'b0, acc2[k][YCC_FRAC+7:YCC_FRAC]} + 9'(acc2[k][YCC_FRAC-1]);
      if (acc2[k] < 0)  ch_c[k] = 8'd0;
      else if (r9[8])   ch_c[k] = 8'd255;
      else              ch_c[k] = r9[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_rts <= 1'b0;
      out_ycc <= '0;
    end else if (adv) begin
      out_rts    <= v2;
      out_ycc.y  <= ch_c[0];
      out_ycc.cb <= ch_c[1];
      out_ycc.cr <= ch_c[2];
    end
  end
endmodule
