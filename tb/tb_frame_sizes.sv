// tb_frame_sizes: the system at its default parameters on the two frame
// sizes the design is rated for.
//
// 512 x 512: the histograms fill the 1024-entry RAM exactly. The frame is
// streamed with in_rts always high; it must take W*H + H cycles plus the
// pipeline latency, which at a 50 MHz clock is about 190 frames per second.
// All 1024 counts are read back and compared with counts made here.
// 640 x 480: 640 + 480 = 1120 counts do not fit; the column counts and the
// first 384 row counts must be right and hist_ovf must be set.
// Pixels are random; the YCbCr path with a Cb/Cr window selects about a
// quarter of them, and the expected mask comes from the reference model.
module tb_frame_sizes;
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

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int col_ref [1024];
  int row_ref [1024];

  function automatic bit ref_mask(rgb_t p);
    ycc_t y;
    y = ref_ycc(p);
    return (y.cb >= 8'd100 && y.cb <= 8'd160 && y.cr >= 8'd100 && y.cr <= 8'd160);
  endfunction

  task automatic run(int w, int h, output int unsigned cyc);
    int unsigned t0;
    @(negedge clk);
    loc_clear = 1'b1;
    loc_num_cols = 10'(w);
    @(negedge clk);
    loc_clear = 1'b0;
    for (int c = 0; c < w; c++) col_ref[c] = 0;
    for (int r = 0; r < h; r++) row_ref[r] = 0;
    t0 = cycle;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        rgb_t p;
        bit m;
        p = rgb_t'(24'($urandom));
        m = ref_mask(p);
        in_rts = 1'b1;
        in_rgb = p;
        while (!in_ack) @(negedge clk);
        @(negedge clk);
        col_ref[x] += int'(m);
        row_ref[y] += int'(m);
      end
    end
    in_rts = 1'b0;
    while (int'(rows_done) != (h % 1024)) @(negedge clk);
    cyc = cycle - t0;
  endtask

  task automatic compare(int w, int h, string tag);
    int bad = 0;
    for (int a = 0; a < 1024 && a < w + h; a++) begin
      int want;
      @(negedge clk);
      hist_rd_en = 1'b1;
      hist_rd_addr = 10'(a);
      @(negedge clk);
      hist_rd_en = 1'b0;
      want = (a < w) ? col_ref[a] : row_ref[a - w];
      checks++;
      if (!hist_rd_valid || int'(hist_rd_data) != want) begin
        failures++;
        bad++;
        if (bad < 10) $display("%s: address %0d count %0d want %0d", tag, a, hist_rd_data, want);
      end
    end
  endtask

  initial begin
    int unsigned cyc;
    in_rts = 1'b0; in_rgb = '0; space_sel = SPACE_YCBCR;
    thr_clear = 1'b0; thr_set_chan = 2'd0; thr_min = '0; thr_max = '0;
    loc_clear = 1'b0; loc_num_cols = '0; hist_rd_en = 1'b0; hist_rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    thr_set_chan = 2'd2; thr_min = 8'd100; thr_max = 8'd160;
    @(negedge clk);
    thr_set_chan = 2'd3;
    @(negedge clk);
    thr_set_chan = 2'd0;

    run(512, 512, cyc);
    $display("512x512: %0d cycles, %0.1f frames/s at 50 MHz", cyc, 50.0e6 / real'(cyc));
    checks++;
    if (cyc < 512 * 512 + 512 || cyc > 512 * 512 + 512 + 8) begin
      failures++;
      $display("512x512 frame took %0d cycles, want %0d plus latency", cyc, 512 * 512 + 512);
    end
    checks++;
    if (hist_ovf) begin
      failures++;
      $display("512x512 frame overflowed");
    end
    compare(512, 512, "512x512");

    run(640, 480, cyc);
    $display("640x480: %0d cycles", cyc);
    checks++;
    if (!hist_ovf) begin
      failures++;
      $display("640x480 frame did not raise hist_ovf");
    end
    compare(640, 480, "640x480");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
