// tb_rgb2hsl: self-checking testbench for rgb2hsl.
//
// Feeds corner pixels and random pixels through the converter with random
// gaps on the input and random back-pressure on the output, and checks:
//   - every output word, bit-exactly, against a reference of the fixed-point
//     algorithm written here (lookup-table division with rounded inverse and
//     rounded result, unsigned hue selection, hue offset and saturation
//     shift);
//   - each output against the real-valued HSL equations, within 2 codes for
//     hue, 1 + 1% for saturation (the algorithm scales by 128 where the
//     equation has 127) and exactly for lumience (pixels where the equations
//     are undefined or the saturation clamps are skipped);
//   - the latency of 5 cycles and one pixel per cycle throughput.
module tb_rgb2hsl;
  import ev_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_rts, in_ack, out_rts, out_ack;
  rgb_t in_rgb;
  hsl_t out_hsl;

  int checks = 0;
  int failures = 0;

  rgb2hsl dut (.clk, .rst_n, .in_rts, .in_ack, .in_rgb, .out_rts, .out_ack, .out_hsl);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int divref(int n, int d);
    longint inv;
    if (d == 0) return 65535;
    inv = longint'(131072.0 / real'(d));
    return int'((longint'(n) * inv + 65536) / 131072);
  endfunction

  function automatic hsl_t ref_hsl(rgb_t p);
    int r, g, b, mx, mn, delta, lum, diff, off, hq, h42, hr, hue, den, sq, sat;
    bit sub;
    hsl_t o;
    r = p.r; g = p.g; b = p.b;
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    delta = mx - mn;
    lum = mx / 2 + mn / 2;
    if (mx == r)      begin off = 42;  sub = !(g > b); diff = sub ? b - g : g - b; end
    else if (mx == g) begin off = 126; sub = !(b > r); diff = sub ? r - b : b - r; end
    else              begin off = 210; sub = !(r > g); diff = sub ? g - r : r - g; end
    if (delta == 0) begin
      hue = 255;
      sat = 0;
    end else begin
      hq  = divref(diff * 256, delta);
      h42 = hq * 42;
      hr  = ((h42 >> 8) & 255) + ((h42 >> 7) & 1);
      hue = (sub ? off - hr : off + hr) & 255;
      den = (lum <= 127) ? lum : 255 - lum;
      sq  = divref(delta * 256, den);
      sat = (sq >> 1) + (sq & 1);
      if (sq >= 512 || sat > 255) sat = 255;
    end
    o.h = 8'(hue); o.s = 8'(sat); o.l = 8'(lum);
    return o;
  endfunction

  // Real-valued equations (hue rotated by 60 degrees, 42 codes per 60 deg).
  task automatic check_real(rgb_t p, hsl_t o);
    real r, g, b, mx, mn, lum, h, s;
    r = p.r; g = p.g; b = p.b;
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    lum = mx / 2.0 + mn / 2.0;
    checks++;
    if (o.l != 8'(int'($floor(mx / 2.0) + $floor(mn / 2.0)))) begin
      failures++;
      $display("L differs from equation for %0d,%0d,%0d", p.r, p.g, p.b);
    end
    if (mx == mn) return;
    if (mx == r)      h = 42.0 * (g - b) / (mx - mn) + 42.0;
    else if (mx == g) h = 42.0 * (b - r) / (mx - mn) + 126.0;
    else              h = 42.0 * (r - g) / (mx - mn) + 210.0;
    checks++;
    if ((real'(o.h) - h) > 2.0 || (h - real'(o.h)) > 2.0) begin
      failures++;
      $display("H %0d vs equation %f for %0d,%0d,%0d", o.h, h, p.r, p.g, p.b);
    end
    // Saturation with L halved channel by channel (as the hardware does);
    // the Q8.8 shift scales by 128 rather than 127, hence the wider margin.
    lum = $floor(mx / 2.0) + $floor(mn / 2.0);
    if (lum == 0.0) return;
    s = (lum <= 127.0) ? 127.0 * (mx - mn) / lum : 127.0 * (mx - mn) / (255.0 - lum);
    if (s > 252.0) return;
    checks++;
    if ((real'(o.s) - s) > 1.0 + s / 100.0 || (s - real'(o.s)) > 1.0 + s / 100.0) begin
      failures++;
      $display("S %0d vs equation %f for %0d,%0d,%0d", o.s, s, p.r, p.g, p.b);
    end
  endtask

  typedef struct { rgb_t p; int unsigned cyc; } item_t;
  item_t q[$];
  int unsigned cycle = 0;
  int unsigned max_lat = 0;
  bit random_bp = 1'b0;
  int unsigned n_out = 0;
  int unsigned out_cyc_first = 0, out_cyc_32 = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_rts && in_ack) q.push_back('{p: in_rgb, cyc: cycle});
      if (out_rts && out_ack) begin
        item_t it;
        hsl_t  e;
        n_out++;
        if (n_out == 1)  out_cyc_first = cycle;
        if (n_out == 32) out_cyc_32 = cycle;
        if (q.size() == 0) begin
          failures++;
          $display("output with no input");
        end else begin
          it = q.pop_front();
          e  = ref_hsl(it.p);
          checks++;
          if (out_hsl !== e) begin
            failures++;
            $display("MISMATCH rgb=%0d,%0d,%0d got h%0d s%0d l%0d want h%0d s%0d l%0d",
                     it.p.r, it.p.g, it.p.b, out_hsl.h, out_hsl.s, out_hsl.l, e.h, e.s, e.l);
          end
          check_real(it.p, out_hsl);
          if (cycle - it.cyc > max_lat) max_lat = cycle - it.cyc;
        end
      end
      out_ack <= random_bp ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  // Inputs change at the falling edge; a word moves at the next rising edge
  // at which in_ack is high (in_ack does not depend on in_rts).
  task automatic send(rgb_t p, bit gaps);
    @(negedge clk);
    if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
    in_rts = 1'b1;
    in_rgb = p;
    while (!in_ack) @(negedge clk);
    @(posedge clk);
    #1 in_rts = 1'b0;
  endtask

  rgb_t corners[$] = '{
    '{8'd0, 8'd0, 8'd0}, '{8'd255, 8'd255, 8'd255}, '{8'd128, 8'd128, 8'd128},
    '{8'd255, 8'd0, 8'd0}, '{8'd0, 8'd255, 8'd0}, '{8'd0, 8'd0, 8'd255},
    '{8'd1, 8'd0, 8'd0}, '{8'd255, 8'd255, 8'd0}, '{8'd0, 8'd255, 8'd255},
    '{8'd255, 8'd0, 8'd255}, '{8'd200, 8'd100, 8'd100}, '{8'd100, 8'd200, 8'd100},
    '{8'd100, 8'd100, 8'd200}, '{8'd255, 8'd128, 8'd0}, '{8'd10, 8'd20, 8'd30},
    '{8'd240, 8'd250, 8'd245}, '{8'd255, 8'd254, 8'd254}, '{8'd3, 8'd1, 8'd2}
  };

  initial begin
    in_rts = 1'b0; in_rgb = '0; out_ack = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Latency and throughput: a burst of 32 pixels with the output always
    // taken must come out 5 cycles later and back to back.
    for (int i = 0; i < 32; i++) send(rgb_t'(24'($urandom)), 0);
    wait (n_out == 32);
    checks++;
    if (max_lat != 5 || out_cyc_32 - out_cyc_first != 31) begin
      failures++;
      $display("timing: latency %0d, 32 outputs spread over %0d cycles", max_lat,
               out_cyc_32 - out_cyc_first + 1);
    end

    foreach (corners[i]) send(corners[i], 0);
    random_bp = 1'b1;
    for (int i = 0; i < 20000; i++) send(rgb_t'(24'($urandom)), 1);
    random_bp = 1'b0;
    for (int i = 0; i < 256; i++) send('{8'(i), 8'($urandom), 8'(255 - i)}, 0);
    repeat (20) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d pixels never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
