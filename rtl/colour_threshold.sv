// colour_threshold: three-channel colour thresholder producing a binary mask.
//
// Holds a [min, max] window for each of three 8-bit channels. A pixel matches
// (mask bit 1) when every channel lies inside its window, bounds included.
// Channel 1 is the most significant byte of in_pix (H, Y or R), channel 3 the
// least significant (L, Cr or B), matching the field order of ev_pkg's pixel
// structs.
//
// Configuration, as in the published algorithm, shares the module with the
// pixel stream: in a cycle with set_chan = 1, 2 or 3 the window of that
// channel is loaded from min_val/max_val and no pixel is taken; with
// set_chan = 0 pixels are compared. `clear` (and the reset) restores the
// default state in which every window is [0, 255], so every pixel matches.
// clear has priority over set_chan.
//
// Interface: EyeLink streams, in_rts/in_ack/in_pix in and out_rts/out_ack/
// out_match out, one registered stage (latency 1, one pixel per cycle).
// in_ack = (!out_rts | out_ack) & !clear & (set_chan == 0): holding in_ack
// low during configuration cycles is this design's own choice, so that no
// pixel is lost while a window changes.
module colour_threshold
  import ev_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        clear,
  input  logic [1:0]  set_chan,
  input  logic [7:0]  min_val,
  input  logic [7:0]  max_val,
  // pixel stream
  input  logic        in_rts,
  output logic        in_ack,
  input  chan3_t      in_pix,
  // mask stream
  output logic        out_rts,
  input  logic        out_ack,
  output logic        out_match
);
  // lim_min[k]/lim_max[k] hold the window of channel k+1.
  logic [7:0] lim_min [3];
  logic [7:0] lim_max [3];

  logic adv, cfg;
  assign cfg    = clear || (set_chan != 2'd0);
  assign adv    = !out_rts || out_ack;
  assign in_ack = adv && !cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        lim_min[k] <= 8'd0;
        lim_max[k] <= 8'd255;
      end
    end else if (clear) begin
      for (int k = 0; k < 3; k++) begin
        lim_min[k] <= 8'd0;
        lim_max[k] <= 8'd255;
      end
    end else if (set_chan != 2'd0) begin
      lim_min[set_chan - 2'd1] <= min_val;
      lim_max[set_chan - 2'd1] <= max_val;
    end
  end

  // Channel k+1 is in_pix[2-k].
  logic match_c;
  always_comb begin
    match_c = 1'b1;
    for (int k = 0; k < 3; k++) begin
      if (in_pix[2-k] < lim_min[k] || in_pix[2-k] > lim_max[k]) match_c = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_rts   <= 1'b0;
      out_match <= 1'b0;
    end else if (adv) begin
      out_rts   <= in_rts && !cfg;
      out_match <= match_c;
    end
  end
endmodule
