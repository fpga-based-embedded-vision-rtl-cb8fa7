// tb_colour_threshold: self-checking testbench for colour_threshold.
//
// Checks that after reset every pixel matches (all windows [0,255]); that
// windows loaded one channel at a time select exactly the pixels inside all
// three windows (bounds inclusive); that no pixel is taken during a
// configuration or clear cycle; that clear restores the match-all state; and
// the one-cycle latency with one pixel per cycle under random back-pressure.
module tb_colour_threshold;
  import ev_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear;
  logic [1:0] set_chan;
  logic [7:0] min_val, max_val;
  logic       in_rts, in_ack, out_rts, out_ack, out_match;
  chan3_t     in_pix;

  int checks = 0;
  int failures = 0;

  colour_threshold dut (.clk, .rst_n, .clear, .set_chan, .min_val, .max_val,
                        .in_rts, .in_ack, .in_pix, .out_rts, .out_ack, .out_match);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference windows, channel 1..3 = index 0..2.
  int lo [3] = '{0, 0, 0};
  int hi [3] = '{255, 255, 255};
  int unsigned cycle = 0, n_out = 0, max_lat = 0, c1 = 0, c16 = 0, n_match = 0;
  bit random_bp = 1'b0;

  typedef struct { chan3_t p; bit m; int unsigned cyc; } item_t;
  item_t q[$];

  function automatic bit ref_match(chan3_t p);
    bit m = 1'b1;
    for (int k = 0; k < 3; k++) begin
      int v;
      v = int'(p[2-k]);
      if (v < lo[k] || v > hi[k]) m = 1'b0;
    end
    return m;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_rts && in_ack) q.push_back('{p: in_pix, m: ref_match(in_pix), cyc: cycle});
      if (out_rts && out_ack) begin
        item_t it;
        n_out++;
        if (n_out == 1)  c1 = cycle;
        if (n_out == 16) c16 = cycle;
        it = q.pop_front();
        checks++;
        if (out_match !== it.m) begin
          failures++;
          $display("MISMATCH pix=%0d,%0d,%0d got %0b want %0b", it.p[2], it.p[1], it.p[0],
                   out_match, it.m);
        end
        n_match += int'(out_match);
        if (cycle - it.cyc > max_lat) max_lat = cycle - it.cyc;
      end
      out_ack <= random_bp ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  task automatic send(chan3_t p, bit gaps);
    @(negedge clk);
    if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
    in_rts = 1'b1;
    in_pix = p;
    while (!in_ack) @(negedge clk);
    @(posedge clk);
    #1 in_rts = 1'b0;
  endtask

  // Load one window; a pixel is offered at the same time and must wait.
  task automatic set_window(int ch, int mn, int mx);
    @(negedge clk);
    set_chan = 2'(ch);
    min_val  = 8'(mn);
    max_val  = 8'(mx);
    in_rts   = 1'b1;
    in_pix   = chan3_t'(24'($urandom));
    #1;
    checks++;
    if (in_ack) begin
      failures++;
      $display("in_ack high during a configuration cycle");
    end
    @(posedge clk);
    #1 set_chan = 2'd0;
    lo[ch-1] = mn;
    hi[ch-1] = mx;
    in_rts = 1'b0;
  endtask

  initial begin
    clear = 1'b0; set_chan = 2'd0; min_val = '0; max_val = '0;
    in_rts = 1'b0; in_pix = '0; out_ack = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // Default state: everything matches; also timing.
    for (int i = 0; i < 16; i++) send(chan3_t'(24'($urandom)), 0);
    wait (n_out == 16);
    checks++;
    if (max_lat != 1 || c16 - c1 != 15 || n_match != 16) begin
      failures++;
      $display("default/timing: latency %0d, spread %0d, matches %0d", max_lat, c16 - c1 + 1,
               n_match);
    end

    // The orange-box example: hue 54 +/- 5, any saturation / lumience.
    set_window(1, 49, 59);
    for (int h = 40; h < 70; h++) send({8'(h), 8'($urandom), 8'($urandom)}, 0);
    // Skin tone example on Cb/Cr.
    set_window(1, 0, 255);
    set_window(2, 77, 127);
    set_window(3, 133, 173);
    random_bp = 1'b1;
    for (int i = 0; i < 5000; i++)
      send({8'($urandom), 8'($urandom_range(60, 140)), 8'($urandom_range(120, 190))}, 1);
    // Random windows.
    for (int w = 0; w < 20; w++) begin
      int a, b;
      for (int ch = 1; ch <= 3; ch++) begin
        a = $urandom_range(0, 255);
        b = $urandom_range(a, 255);
        set_window(ch, a, b);
      end
      for (int i = 0; i < 200; i++) send(chan3_t'(24'($urandom)), 1);
    end
    random_bp = 1'b0;
    repeat (4) @(posedge clk);

    // clear restores match-all; in_ack is low during the clear cycle.
    @(negedge clk);
    clear = 1'b1;
    #1;
    checks++;
    if (in_ack) begin
      failures++;
      $display("in_ack high during clear");
    end
    @(posedge clk);
    #1 clear = 1'b0;
    lo = '{0, 0, 0};
    hi = '{255, 255, 255};
    n_match = 0;
    for (int i = 0; i < 50; i++) send(chan3_t'(24'($urandom)), 0);
    repeat (4) @(posedge clk);
    checks++;
    if (n_match != 50 || q.size() != 0) begin
      failures++;
      $display("after clear %0d of 50 matched, %0d left", n_match, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
