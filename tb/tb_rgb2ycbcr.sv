// tb_rgb2ycbcr: self-checking testbench for rgb2ycbcr.
//
// Drives corner and random pixels (with input gaps and output back-pressure)
// and checks each output against the JPEG equations evaluated here in real
// arithmetic, rounded to nearest and clamped to 0..255: Y, Cb and Cr may
// differ by at most 1 code (17-bit coefficients). Each output must also
// equal, bit for bit, the fixed-point model in tb_ref_pkg (Q.17 products,
// rounding on bit 16, clamping). Grey pixels must give
// exactly Y = grey level and Cb = Cr = 128. Also checks the 3-cycle latency
// and one pixel per cycle throughput.
module tb_rgb2ycbcr;
  import ev_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_rts, in_ack, out_rts, out_ack;
  rgb_t in_rgb;
  ycc_t out_ycc;

  int checks = 0;
  int failures = 0;

  rgb2ycbcr dut (.clk, .rst_n, .in_rts, .in_ack, .in_rgb, .out_rts, .out_ack, .out_ycc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp_round(real v);
    int i;
    i = int'($floor(v + 0.5));
    if (i < 0) i = 0;
    if (i > 255) i = 255;
    return i;
  endfunction

  function automatic bit near(int got, int want);
    return (got - want <= 1) && (want - got <= 1);
  endfunction

  typedef struct { rgb_t p; int unsigned cyc; } item_t;
  item_t q[$];
  int unsigned cycle = 0, max_lat = 0, n_out = 0, c1 = 0, c32 = 0;
  bit random_bp = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_rts && in_ack) q.push_back('{p: in_rgb, cyc: cycle});
      if (out_rts && out_ack) begin
        item_t it;
        real r, g, b;
        int y, cb, cr;
        n_out++;
        if (n_out == 1)  c1 = cycle;
        if (n_out == 32) c32 = cycle;
        it = q.pop_front();
        r = it.p.r; g = it.p.g; b = it.p.b;
        y  = clamp_round(0.299 * r + 0.587 * g + 0.114 * b);
        cb = clamp_round(128.0 - 0.168736 * r - 0.331264 * g + 0.5 * b);
        cr = clamp_round(128.0 + 0.5 * r - 0.418688 * g - 0.081312 * b);
        checks++;
        if (!near(out_ycc.y, y) || !near(out_ycc.cb, cb) || !near(out_ycc.cr, cr)) begin
          failures++;
          $display("MISMATCH rgb=%0d,%0d,%0d got %0d,%0d,%0d want %0d,%0d,%0d", it.p.r, it.p.g,
                   it.p.b, out_ycc.y, out_ycc.cb, out_ycc.cr, y, cb, cr);
        end
        if (it.p.r == it.p.g && it.p.g == it.p.b) begin
          checks++;
          if (out_ycc.y != it.p.r || out_ycc.cb != 8'd128 || out_ycc.cr != 8'd128) begin
            failures++;
            $display("grey %0d gave %0d,%0d,%0d", it.p.r, out_ycc.y, out_ycc.cb, out_ycc.cr);
          end
        end
        checks++;
        if (out_ycc !== ref_ycc(it.p)) begin
          failures++;
          $display("fixed-point MISMATCH rgb=%0d,%0d,%0d got %0d,%0d,%0d", it.p.r, it.p.g, it.p.b,
                   out_ycc.y, out_ycc.cb, out_ycc.cr);
        end
        if (cycle - it.cyc > max_lat) max_lat = cycle - it.cyc;
      end
      out_ack <= random_bp ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  task automatic send(rgb_t p, bit gaps);
    @(negedge clk);
    if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
    in_rts = 1'b1;
    in_rgb = p;
    while (!in_ack) @(negedge clk);
    @(posedge clk);
    #1 in_rts = 1'b0;
  endtask

  initial begin
    in_rts = 1'b0; in_rgb = '0; out_ack = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    for (int i = 0; i < 32; i++) send(rgb_t'(24'($urandom)), 0);
    wait (n_out == 32);
    checks++;
    if (max_lat != 3 || c32 - c1 != 31) begin
      failures++;
      $display("timing: latency %0d, 32 outputs over %0d cycles", max_lat, c32 - c1 + 1);
    end

    for (int i = 0; i < 256; i++) send('{8'(i), 8'(i), 8'(i)}, 0);
    send('{8'd255, 8'd0, 8'd0}, 0);
    send('{8'd0, 8'd255, 8'd0}, 0);
    send('{8'd0, 8'd0, 8'd255}, 0);
    random_bp = 1'b1;
    for (int i = 0; i < 20000; i++) send(rgb_t'(24'($urandom)), 1);
    random_bp = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != 32 + 256 + 3 + 20000) begin
      failures++;
      $display("%0d outputs, %0d pixels left", n_out, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
