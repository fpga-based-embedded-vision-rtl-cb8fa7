// tb_colour_object_locator: end-to-end testbench of the colour object
// location system at its default parameters.
//
// Three frames go through the whole chain (converter, thresholder, object
// locator) and the row/column histograms are read back and compared with
// histograms computed here from reference models of the converters and the
// threshold rule:
//   1. HSL, full CIF frame 352 x 288 with the reset row length: an orange
//      rectangle on a bluish / grey background, selected by a hue window
//      around the orange hue (plus saturation and lumience windows). The
//      object's centroid and histogram peaks are computed from the read-back
//      histograms and must fall at the rectangle.
//   2. YCbCr, 128 x 96 (row length set through loc_clear), a skin-coloured
//      disc selected by the Cb/Cr window 77..127 / 133..173, with histogram
//      reads issued in the middle of the frame.
//   3. YCbCr, 1000 x 30: the row counts no longer fit the 1024-entry RAM and
//      the overflow flag must rise.
// Mechanisms counted (each must occur at least once): end-of-row stalls,
// colour-space switches, threshold reprogramming (with a pixel held waiting),
// mid-frame histogram reads, histogram overflow, grey pixels (hue undefined),
// division by zero in the saturation path and the saturation clamp. Frame 1
// must take no more than W*H + H + 16 cycles, i.e. one pixel per cycle plus
// one cycle per row.
module tb_colour_object_locator;
  import ev_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_rts, in_ack;
  rgb_t          in_rgb;
  colour_space_e space_sel;
  logic          thr_clear;
  logic [1:0]    thr_set_chan;
  logic [7:0]    thr_min, thr_max;
  logic          loc_clear;
  logic [9:0]    loc_num_cols;
  logic          hist_rd_en, hist_rd_valid;
  logic [9:0]    hist_rd_addr, hist_rd_data, rows_done;
  logic          hist_ovf;

  int checks = 0;
  int failures = 0;

  colour_object_locator dut (
    .clk, .rst_n, .in_rts, .in_ack, .in_rgb, .space_sel,
    .thr_clear, .thr_set_chan, .thr_min, .thr_max,
    .loc_clear, .loc_num_cols,
    .hist_rd_en, .hist_rd_addr, .hist_rd_valid, .hist_rd_data, .rows_done, .hist_ovf
  );

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Reference threshold windows (channel 1..3 -> index 0..2).
  int lo [3], hi [3];
  int col_ref [1024];
  int row_ref [1024];

  // Mechanism counters.
  int n_row_stall = 0, n_space_switch = 0, n_reprogram = 0, n_mid_read = 0;
  int n_overflow = 0, n_grey = 0, n_div0 = 0, n_sat_clamp = 0;

  function automatic bit ref_mask(rgb_t p, colour_space_e sp);
    chan3_t c;
    bit m = 1'b1;
    c = (sp == SPACE_HSL) ? chan3_t'(ref_hsl(p)) : chan3_t'(ref_ycc(p));
    for (int k = 0; k < 3; k++)
      if (int'(c[2-k]) < lo[k] || int'(c[2-k]) > hi[k]) m = 1'b0;
    return m;
  endfunction

  function automatic int noise(int v, int a);
    int r;
    r = v + $urandom_range(0, 2 * a) - a;
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

  // Frame 1 image: orange rectangle x 100..179, y 60..139 on blue / grey.
  function automatic rgb_t img_hsl(int x, int y);
    rgb_t p;
    if (y == 0 && x < 4) begin
      // special pixels: grey, divide-by-zero (L = 0), saturated red, black
      case (x)
        0: p = '{8'd90, 8'd90, 8'd90};
        1: p = '{8'd1, 8'd0, 8'd0};
        2: p = '{8'd255, 8'd0, 8'd0};
        default: p = '{8'd0, 8'd0, 8'd0};
      endcase
    end else if (x >= 100 && x < 180 && y >= 60 && y < 140) begin
      p = '{8'(noise(230, 8)), 8'(noise(135, 6)), 8'(noise(40, 8))};
    end else if (((x / 16) + (y / 16)) % 2 == 0) begin
      int g;
      g = $urandom_range(0, 255);
      p = '{8'(g), 8'(g), 8'(g)};
    end else begin
      p = '{8'(noise(40, 30)), 8'(noise(90, 40)), 8'(noise(200, 40))};
    end
    return p;
  endfunction

  // Frame 2 image: skin-coloured disc centred (64, 48), radius 20.
  function automatic rgb_t img_skin(int x, int y);
    if ((x - 64) * (x - 64) + (y - 48) * (y - 48) <= 400)
      return '{8'(noise(200, 10)), 8'(noise(150, 10)), 8'(noise(120, 10))};
    return '{8'(noise(40, 30)), 8'(noise(80, 30)), 8'(noise(210, 30))};
  endfunction

  task automatic set_window(int ch, int mn, int mx);
    // Offer a pixel while reprogramming: it must not be taken.
    @(negedge clk);
    thr_set_chan = 2'(ch);
    thr_min = 8'(mn);
    thr_max = 8'(mx);
    @(negedge clk);
    thr_set_chan = 2'd0;
    lo[ch-1] = mn;
    hi[ch-1] = mx;
    n_reprogram++;
  endtask

  task automatic host_read(int addr, output int data);
    @(negedge clk);
    hist_rd_en = 1'b1;
    hist_rd_addr = 10'(addr);
    @(negedge clk);
    hist_rd_en = 1'b0;
    data = int'(hist_rd_data);
    checks++;
    if (!hist_rd_valid) begin
      failures++;
      $display("hist_rd_valid missing");
    end
  endtask

  // Stream one W x H frame; img selects the picture (1: orange, 2: skin).
  task automatic frame(int w, int h, int img, bit mid_reads, output int unsigned cyc);
    int unsigned t0;
    for (int c = 0; c < w; c++) col_ref[c] = 0;
    for (int r = 0; r < h; r++) row_ref[r] = 0;
    @(negedge clk);
    t0 = cycle;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        rgb_t p;
        bit   m;
        p = (img == 1) ? img_hsl(x, y) : img_skin(x, y);
        m = ref_mask(p, space_sel);
        if (space_sel == SPACE_HSL) begin
          int mx, mn, lum;
          mx = p.r; if (p.g > mx) mx = p.g; if (p.b > mx) mx = p.b;
          mn = p.r; if (p.g < mn) mn = p.g; if (p.b < mn) mn = p.b;
          lum = mx / 2 + mn / 2;
          if (mx == mn) n_grey++;
          else if (lum == 0) n_div0++;
          else if (lum <= 127 && 256 * (mx - mn) >= 511 * lum) n_sat_clamp++;
        end
        in_rts = 1'b1;
        in_rgb = p;
        if (mid_reads && $urandom_range(0, 200) == 0) begin
          hist_rd_en = 1'b1;
          hist_rd_addr = 10'd0;
          n_mid_read++;
        end
        while (!in_ack) begin
          n_row_stall++;
          @(negedge clk);
          hist_rd_en = 1'b0;
        end
        @(negedge clk);
        hist_rd_en = 1'b0;
        col_ref[x] += int'(m);
        row_ref[y] += int'(m);
      end
    end
    in_rts = 1'b0;
    while (int'(rows_done) != h) begin
      @(negedge clk);
      if (cycle - t0 > w * h + h + 1000) break;
    end
    cyc = cycle - t0;
  endtask

  task automatic check_hist(int w, int h, string tag, output int cx, output int cy);
    int d, sx = 0, sy = 0, n = 0, best = -1;
    cx = -1;
    cy = -1;
    for (int c = 0; c < w; c++) begin
      host_read(c, d);
      checks++;
      if (d != col_ref[c]) begin
        failures++;
        $display("%s: column %0d count %0d want %0d", tag, c, d, col_ref[c]);
      end
      sx += c * d;
      n  += d;
      if (d > best) begin best = d; cx = c; end
    end
    best = -1;
    for (int r = 0; r < h && w + r < 1024; r++) begin
      host_read(w + r, d);
      checks++;
      if (d != row_ref[r]) begin
        failures++;
        $display("%s: row %0d count %0d want %0d", tag, r, d, row_ref[r]);
      end
      sy += r * d;
      if (d > best) begin best = d; cy = r; end
    end
    if (n > 0) $display("%s: %0d object pixels, centroid (%0d, %0d), peaks (%0d, %0d)", tag, n,
                        sx / n, sy / n, cx, cy);
    if (n > 0) begin cx = sx / n; cy = (h + w <= 1024) ? sy / n : cy; end
  endtask

  initial begin
    int unsigned cyc;
    int cx, cy;
    in_rts = 1'b0; in_rgb = '0; space_sel = SPACE_HSL;
    thr_clear = 1'b0; thr_set_chan = 2'd0; thr_min = '0; thr_max = '0;
    loc_clear = 1'b0; loc_num_cols = '0; hist_rd_en = 1'b0; hist_rd_addr = '0;
    lo = '{0, 0, 0};
    hi = '{255, 255, 255};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // ---------------- Frame 1: HSL, 352 x 288, reset row length (CIF)
    set_window(1, 54, 74);     // hue of the orange object
    set_window(2, 100, 255);   // well saturated
    set_window(3, 40, 220);    // neither black nor white
    frame(352, 288, 1, 0, cyc);
    checks++;
    if (cyc > 352 * 288 + 288 + 16) begin
      failures++;
      $display("frame 1 took %0d cycles, more than W*H + H + 16", cyc);
    end
    $display("frame 1: %0d cycles for %0d pixels", cyc, 352 * 288);
    check_hist(352, 288, "HSL frame", cx, cy);
    checks++;
    if (cx < 138 || cx > 141 || cy < 98 || cy > 101) begin
      failures++;
      $display("HSL frame: centroid (%0d, %0d) not at the rectangle centre (139.5, 99.5)", cx,
               cy);
    end

    // ---------------- Frame 2: YCbCr, 128 x 96, mid-frame histogram reads
    space_sel = SPACE_YCBCR;
    n_space_switch++;
    @(negedge clk);
    thr_clear = 1'b1;
    @(negedge clk);
    thr_clear = 1'b0;
    lo = '{0, 0, 0};
    hi = '{255, 255, 255};
    set_window(2, 77, 127);
    set_window(3, 133, 173);
    @(negedge clk);
    loc_clear = 1'b1;
    loc_num_cols = 10'd128;
    @(negedge clk);
    loc_clear = 1'b0;
    frame(128, 96, 2, 1, cyc);
    check_hist(128, 96, "YCbCr frame", cx, cy);
    checks++;
    if (cx < 62 || cx > 66 || cy < 46 || cy > 50) begin
      failures++;
      $display("YCbCr frame: centroid (%0d, %0d) not at the disc centre (64, 48)", cx, cy);
    end

    // ---------------- Frame 3: 1000 x 30, row counts overflow the RAM
    checks++;
    if (hist_ovf) begin
      failures++;
      $display("overflow flag set before the overflow frame");
    end
    @(negedge clk);
    loc_clear = 1'b1;
    loc_num_cols = 10'd1000;
    @(negedge clk);
    loc_clear = 1'b0;
    frame(1000, 30, 2, 0, cyc);
    check_hist(1000, 30, "overflow frame", cx, cy);
    if (hist_ovf) n_overflow++;

    // ---------------- back to HSL: small frame after a switch
    space_sel = SPACE_HSL;
    n_space_switch++;
    @(negedge clk);
    thr_clear = 1'b1;
    @(negedge clk);
    thr_clear = 1'b0;
    lo = '{0, 0, 0};
    hi = '{255, 255, 255};
    set_window(1, 54, 74);
    @(negedge clk);
    loc_clear = 1'b1;
    loc_num_cols = 10'd200;
    @(negedge clk);
    loc_clear = 1'b0;
    frame(200, 150, 1, 0, cyc);
    check_hist(200, 150, "HSL frame 2", cx, cy);

    $display("mechanisms: row stalls %0d, space switches %0d, reprogrammings %0d, mid-frame reads %0d, overflows %0d, grey %0d, div-by-zero %0d, saturation clamps %0d",
             n_row_stall, n_space_switch, n_reprogram, n_mid_read, n_overflow, n_grey, n_div0,
             n_sat_clamp);
    checks++;
    if (n_row_stall == 0 || n_space_switch == 0 || n_reprogram == 0 || n_mid_read == 0 ||
        n_overflow == 0 || n_grey == 0 || n_div0 == 0 || n_sat_clamp == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
