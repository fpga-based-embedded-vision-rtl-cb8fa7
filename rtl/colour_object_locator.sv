// colour_object_locator: colour object detection and location pipeline.
//
// An RGB pixel stream (raster order, 8 bits per channel) is converted to a
// colour space in which an object's colour is easier to separate from its
// lighting, thresholded into a one-bit object mask, and the mask is reduced
// to row and column histograms from which the object's position (centroid or
// histogram peaks), spread and orientation can be computed:
//
//   in_rgb --+--> rgb2hsl ---+
//            |               +--(space_sel)--> colour_threshold --> object_locator
//            +--> rgb2ycbcr -+                   (mask stream)       (histogram RAM)
//
// Every stage takes one pixel per clock; the object locator adds one cycle
// per image row, so a W x H frame needs about W*H + H cycles plus the
// pipeline latency (HSL path 5 + 1, YCbCr path 3 + 1 cycles before a mask bit
// reaches the locator). Blocks are joined by EyeLink links (ready-to-send /
// acknowledge), so a stall anywhere (a threshold being reprogrammed, the
// locator's end-of-row cycle, a histogram read) back-pressures the source.
//
// The split into these blocks and their chaining follow the published system.
// Running both converters side by side with a selector is this design's own
// way of offering both colour spaces to one thresholder: both convert every
// pixel (the input is acknowledged only when both can take it) and the
// converter that is not selected has its output discarded. space_sel should
// only change while no pixels are in flight, between frames.
//
// Ports: in_rts/in_ack/in_rgb (pixel stream); space_sel; thr_clear,
// thr_set_chan, thr_min, thr_max (threshold windows, see colour_threshold);
// loc_clear, loc_num_cols (new frame, row length); hist_rd_* (histogram
// readout, see object_locator); rows_done, hist_ovf (status).
module colour_object_locator
  import ev_pkg::*;
#(
  parameter int unsigned HIST_DEPTH   = 1024,
  parameter int unsigned CNT_W        = 10,
  parameter int unsigned DEFAULT_COLS = 352,
  localparam int unsigned AW          = $clog2(HIST_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel stream
  input  logic             in_rts,
  output logic             in_ack,
  input  rgb_t             in_rgb,
  // colour space selection
  input  colour_space_e    space_sel,
  // thresholder configuration
  input  logic             thr_clear,
  input  logic [1:0]       thr_set_chan,
  input  logic [7:0]       thr_min,
  input  logic [7:0]       thr_max,
  // object locator control
  input  logic             loc_clear,
  input  logic [AW-1:0]    loc_num_cols,
  // histogram readout
  input  logic             hist_rd_en,
  input  logic [AW-1:0]    hist_rd_addr,
  output logic             hist_rd_valid,
  output logic [CNT_W-1:0] hist_rd_data,
  output logic [AW-1:0]    rows_done,
  output logic             hist_ovf
);
  eyelink_if #(.W(24)) l_in   (.clk, .rst_n);
  eyelink_if #(.W(24)) l_hsl  (.clk, .rst_n);
  eyelink_if #(.W(24)) l_ycc  (.clk, .rst_n);
  eyelink_if #(.W(24)) l_thr  (.clk, .rst_n);
  eyelink_if #(.W(1))  l_mask (.clk, .rst_n);

  // ------------------------------------------------------------ input fork
  logic hsl_in_ack, ycc_in_ack;

  assign l_in.el_ready_to_send = in_rts;
  assign l_in.el_data          = in_rgb;
  assign l_in.el_ack_data      = hsl_in_ack && ycc_in_ack;
  assign in_ack                = l_in.el_ack_data;

  hsl_t hsl_px;
  ycc_t ycc_px;

  rgb2hsl u_hsl (
    .clk, .rst_n,
    .in_rts (l_in.xfer), .in_ack (hsl_in_ack), .in_rgb (rgb_t'(l_in.el_data)),
    .out_rts(l_hsl.el_ready_to_send), .out_ack(l_hsl.el_ack_data), .out_hsl(hsl_px)
  );
  assign l_hsl.el_data = hsl_px;

  rgb2ycbcr u_ycc (
    .clk, .rst_n,
    .in_rts (l_in.xfer), .in_ack (ycc_in_ack), .in_rgb (rgb_t'(l_in.el_data)),
    .out_rts(l_ycc.el_ready_to_send), .out_ack(l_ycc.el_ack_data), .out_ycc(ycc_px)
  );
  assign l_ycc.el_data = ycc_px;

  // ------------------------------------------------- colour space selector
  always_comb begin
    if (space_sel == SPACE_YCBCR) begin
      l_thr.el_ready_to_send = l_ycc.el_ready_to_send;
      l_thr.el_data          = l_ycc.el_data;
      l_ycc.el_ack_data      = l_thr.el_ack_data;
      l_hsl.el_ack_data      = 1'b1;
    end else begin
      l_thr.el_ready_to_send = l_hsl.el_ready_to_send;
      l_thr.el_data          = l_hsl.el_data;
      l_hsl.el_ack_data      = l_thr.el_ack_data;
      l_ycc.el_ack_data      = 1'b1;
    end
  end

  // ----------------------------------------------------------- thresholder
  logic mask_bit;

  colour_threshold u_thr (
    .clk, .rst_n,
    .clear(thr_clear), .set_chan(thr_set_chan), .min_val(thr_min), .max_val(thr_max),
    .in_rts(l_thr.el_ready_to_send), .in_ack(l_thr.el_ack_data), .in_pix(chan3_t'(l_thr.el_data)),
    .out_rts(l_mask.el_ready_to_send), .out_ack(l_mask.el_ack_data), .out_match(mask_bit)
  );
  assign l_mask.el_data = mask_bit;

  // -------------------------------------------------------- object locator
  object_locator #(.DEPTH(HIST_DEPTH), .CNT_W(CNT_W), .DEFAULT_COLS(DEFAULT_COLS)) u_loc (
    .clk, .rst_n,
    .clear(loc_clear), .num_cols(loc_num_cols),
    .in_rts(l_mask.el_ready_to_send), .in_ack(l_mask.el_ack_data), .in_pix(l_mask.el_data[0]),
    .hist_rd_en, .hist_rd_addr, .hist_rd_valid, .hist_rd_data,
    .rows_done, .hist_ovf
  );
endmodule
