// tb_object_locator: self-checking testbench for object_locator.
//
// Streams binary masks in raster order and reads the histograms back through
// the host port, comparing every row and column count with counts made here.
// Covers: the reset row length (352, CIF) with a few rows; small frames set
// through clear/num_cols; back-to-back frames without clearing the RAM (row 0
// overwrites old column counts); the cool-down cycle (a W x H frame sent
// with in_rts always high must take exactly W*H + H cycles); host reads in
// the middle of a frame (which stall the input for one cycle but must not
// corrupt counts); and the overflow flag when row counts no longer fit in the
// RAM.
module tb_object_locator;
  localparam int DEPTH = 1024;
  localparam int AW    = 10;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clear;
  logic [AW-1:0] num_cols;
  logic          in_rts, in_ack, in_pix;
  logic          hist_rd_en, hist_rd_valid;
  logic [AW-1:0] hist_rd_addr;
  logic [9:0]    hist_rd_data;
  logic [AW-1:0] rows_done;
  logic          hist_ovf;

  int checks = 0;
  int failures = 0;

  object_locator dut (.clk, .rst_n, .clear, .num_cols, .in_rts, .in_ack, .in_pix,
                      .hist_rd_en, .hist_rd_addr, .hist_rd_valid, .hist_rd_data,
                      .rows_done, .hist_ovf);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int col_ref [1024];
  int row_ref [1024];
  int n_host_stalls = 0;

  task automatic do_clear(int cols);
    @(negedge clk);
    clear = 1'b1;
    num_cols = AW'(cols);
    @(negedge clk);
    clear = 1'b0;
  endtask

  task automatic host_read(int addr, output int data);
    @(negedge clk);
    hist_rd_en   = 1'b1;
    hist_rd_addr = AW'(addr);
    @(negedge clk);
    hist_rd_en = 1'b0;
    checks++;
    if (!hist_rd_valid) begin
      failures++;
      $display("hist_rd_valid missing");
    end
    data = int'(hist_rd_data);
  endtask

  // Stream a W x H frame of random mask bits with density dens/16; returns
  // the cycles from the first pixel taken to the last row written.
  // With mid_reads, the host reads address 0 now and then during the frame.
  task automatic frame(int w, int h, int dens, bit mid_reads, output int unsigned cyc);
    int unsigned t0;
    for (int c = 0; c < w; c++) col_ref[c] = 0;
    for (int r = 0; r < h; r++) row_ref[r] = 0;
    @(negedge clk);
    t0 = cycle;
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        bit p;
        p = ($urandom_range(0, 15) < dens);
        in_rts = 1'b1;
        in_pix = p;
        if (mid_reads && $urandom_range(0, 50) == 0) begin
          hist_rd_en = 1'b1;
          hist_rd_addr = '0;
        end
        while (!in_ack) begin
          @(negedge clk);
          hist_rd_en = 1'b0;
        end
        if (hist_rd_en) n_host_stalls++;
        @(negedge clk);
        hist_rd_en = 1'b0;
        col_ref[c] += int'(p);
        row_ref[r] += int'(p);
      end
    end
    in_rts = 1'b0;
    // last row's cool-down cycle
    @(negedge clk);
    cyc = cycle - t0;
  endtask

  task automatic check_hist(int w, int h, string tag);
    int d;
    for (int c = 0; c < w; c++) begin
      host_read(c, d);
      checks++;
      if (d != col_ref[c]) begin
        failures++;
        $display("%s: column %0d count %0d want %0d", tag, c, d, col_ref[c]);
      end
    end
    for (int r = 0; r < h && w + r < DEPTH; r++) begin
      host_read(w + r, d);
      checks++;
      if (d != row_ref[r]) begin
        failures++;
        $display("%s: row %0d count %0d want %0d", tag, r, d, row_ref[r]);
      end
    end
    checks++;
    if (int'(rows_done) != h) begin
      failures++;
      $display("%s: rows_done %0d want %0d", tag, rows_done, h);
    end
  endtask

  initial begin
    int unsigned cyc;
    clear = 1'b0; num_cols = '0; in_rts = 1'b0; in_pix = 1'b0;
    hist_rd_en = 1'b0; hist_rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // Reset row length: 352 columns, 6 rows.
    frame(352, 6, 8, 0, cyc);
    checks++;
    if (cyc != 352 * 6 + 6) begin
      failures++;
      $display("352x6 frame took %0d cycles, want %0d", cyc, 352 * 6 + 6);
    end
    check_hist(352, 6, "cif");

    // Small frame, then a second one without any RAM clearing.
    do_clear(16);
    frame(16, 12, 5, 0, cyc);
    checks++;
    if (cyc != 16 * 12 + 12) begin
      failures++;
      $display("16x12 frame took %0d cycles", cyc);
    end
    check_hist(16, 12, "small");
    do_clear(16);
    frame(16, 12, 12, 0, cyc);
    check_hist(16, 12, "small2");

    // Single-column and dense frames.
    do_clear(1);
    frame(1, 20, 9, 0, cyc);
    check_hist(1, 20, "one column");
    do_clear(40);
    frame(40, 30, 16, 0, cyc);
    check_hist(40, 30, "full");

    // Host reads during the frame.
    do_clear(64);
    frame(64, 40, 7, 1, cyc);
    check_hist(64, 40, "mid reads");
    checks++;
    if (n_host_stalls == 0) begin
      failures++;
      $display("no host read happened during a frame");
    end

    // Row counts beyond the RAM: 1000 columns + 30 rows > 1024 entries.
    checks++;
    if (hist_ovf) begin
      failures++;
      $display("hist_ovf set too early");
    end
    do_clear(1000);
    frame(1000, 30, 4, 0, cyc);
    check_hist(1000, 30, "overflow");
    checks++;
    if (!hist_ovf) begin
      failures++;
      $display("hist_ovf not set");
    end
    do_clear(8);
    checks++;
    if (hist_ovf) begin
      failures++;
      $display("hist_ovf not cleared");
    end

    $display("host reads during frames: %0d", n_host_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
