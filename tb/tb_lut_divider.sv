// tb_lut_divider: self-checking testbench for lut_divider.
//
// Streams one division per cycle (with random pauses of the enable) into the
// divider and checks every quotient against a reference computed here with
// real arithmetic: inverse = nearest integer to 2^17/d, result = nearest
// integer to n*inverse/2^17. It also checks the two-cycle latency, the
// division-by-zero flag, the tag sideband, and that the mean absolute error
// against the exact quotient n/d over uniformly random operands is close to
// 0.256 (about half that of truncating division, which is checked too).
module tb_lut_divider;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en, in_valid, out_valid, out_dz;
  logic [15:0] num, quot;
  logic [7:0]  den;
  logic [7:0]  tag, out_tag;

  int checks = 0;
  int failures = 0;

  lut_divider #(.NUM_W(16), .TAG_W(8)) dut (
    .clk, .rst_n, .en, .in_valid, .num, .den, .tag,
    .out_valid, .quot, .out_dz, .out_tag
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_div(longint n, longint d);
    longint inv;
    if (d == 0) return 65535;
    inv = longint'(131072.0 / real'(d));          // rounds to nearest
    return (n * inv + 65536) / 131072;
  endfunction

  typedef struct { longint n; longint d; logic [7:0] t; int unsigned cyc; } req_t;
  req_t q[$];
  int unsigned cycle = 0;
  real err_sum = 0.0, trunc_sum = 0.0;
  int  err_cnt = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      req_t r;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        r = q.pop_front();
        checks++;
        if (quot !== 16'(ref_div(r.n, r.d)) || out_tag !== r.t || out_dz !== (r.d == 0)) begin
          failures++;
          $display("MISMATCH %0d/%0d: got %0d tag %0d dz %0b, want %0d", r.n, r.d, quot, out_tag, out_dz,
                   ref_div(r.n, r.d));
        end
        if (r.d != 0) begin
          real exact;
          exact = real'(r.n) / real'(r.d);
          err_sum += (real'(quot) > exact) ? real'(quot) - exact : exact - real'(quot);
          trunc_sum += exact - real'(r.n / r.d);
          err_cnt++;
        end
      end
    end
  end

  task automatic issue(longint n, longint d, bit with_en_gaps);
    en       <= with_en_gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
    in_valid <= 1'b1;
    num      <= 16'(n);
    den      <= 8'(d);
    tag      <= 8'($urandom);
    @(posedge clk);
    while (!en) begin
      en <= ($urandom_range(0, 1) != 0);
      @(posedge clk);
    end
    q.push_back('{n: n, d: d, t: tag, cyc: cycle});
  endtask

  initial begin
    en = 1'b1; in_valid = 1'b0; num = '0; den = '0; tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Latency: a single division, result exactly two edges later.
    in_valid <= 1'b1; num <= 16'd1000; den <= 8'd7; tag <= 8'h5a;
    q.push_back('{n: 1000, d: 7, t: 8'h5a, cyc: 0});
    @(posedge clk);
    in_valid <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (!out_valid || quot != 16'd143) begin
      failures++;
      $display("latency check failed: valid=%0b quot=%0d", out_valid, quot);
    end
    @(posedge clk);

    // Corner operands.
    issue(65535, 1, 0);
    issue(65535, 2, 0);
    issue(65535, 255, 0);
    issue(0, 13, 0);
    issue(12345, 0, 0);
    issue(255 * 256, 127, 0);
    // Every denominator with a random numerator, back to back.
    for (int d = 1; d < 256; d++) issue($urandom_range(0, 65535), d, 0);
    // Random operands with enable gaps.
    for (int i = 0; i < 2000; i++) issue($urandom_range(0, 65535), $urandom_range(1, 255), 1);
    // Random operands, full rate, for the error statistics.
    for (int i = 0; i < 60000; i++) issue($urandom_range(0, 65535), $urandom_range(1, 255), 0);
    en <= 1'b1; in_valid <= 1'b0;
    repeat (4) @(posedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    checks++;
    if (err_sum / err_cnt < 0.24 || err_sum / err_cnt > 0.27) begin
      failures++;
      $display("mean error %f outside 0.24..0.27", err_sum / err_cnt);
    end
    checks++;
    if (trunc_sum / err_cnt < 0.47 || trunc_sum / err_cnt > 0.50) begin
      failures++;
      $display("truncating mean error %f outside 0.47..0.50", trunc_sum / err_cnt);
    end
    $display("mean |error|: lookup divider %f, truncating divider %f", err_sum / err_cnt,
             trunc_sum / err_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
