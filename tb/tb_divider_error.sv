// tb_divider_error: exhaustive error analysis of lut_divider.
//
// Every numerator 0..65535 is divided by every denominator 1..255
// (2^24 - 2^16 divisions, one per cycle). For each result the absolute error
// against the exact quotient n/d is accumulated, and so is the error of a
// truncating divider floor(n/d). Reference figures for uniformly distributed
// operands: lookup divider mean 0.255862, standard deviation 0.157503;
// truncating divider mean 0.487844, standard deviation 0.290281. Each
// measured value must be within 0.0005 of them. No single result may be
// more than 1.0 away from n/d.
module tb_divider_error;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid, out_valid, out_dz;
  logic [15:0] num, quot;
  logic [7:0]  den;
  logic        tag_unused;

  int checks = 0;
  int failures = 0;

  lut_divider dut (.clk, .rst_n, .en(1'b1), .in_valid, .num, .den, .tag(1'b0),
                   .out_valid, .quot, .out_dz, .out_tag(tag_unused));

  always #5 clk = ~clk;

  initial begin
    repeat (17_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands of the last two cycles, to match results (latency 2).
  int unsigned n_d1, d_d1, n_d2, d_d2;
  real s1 = 0.0, s2 = 0.0, t1 = 0.0, t2 = 0.0;
  longint cnt = 0;
  int big = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      n_d2 <= n_d1; d_d2 <= d_d1;
      n_d1 <= int'(num); d_d1 <= int'(den);
      if (out_valid) begin
        real exact, e, et;
        exact = real'(n_d2) / real'(d_d2);
        e  = real'(quot) - exact;
        if (e < 0.0) e = -e;
        et = exact - real'(n_d2 / d_d2);
        s1 += e;  s2 += e * e;
        t1 += et; t2 += et * et;
        cnt++;
        if (e > 1.0) big++;
      end
    end
  end

  initial begin
    real m, sd, mt, sdt;
    in_valid = 1'b0; num = '0; den = 8'd1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    in_valid = 1'b1;
    for (int n = 0; n < 65536; n++) begin
      for (int d = 1; d < 256; d++) begin
        num = 16'(n);
        den = 8'(d);
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    m   = s1 / cnt;
    sd  = $sqrt(s2 / cnt - m * m);
    mt  = t1 / cnt;
    sdt = $sqrt(t2 / cnt - mt * mt);
    $display("%0d divisions: lookup mean %f sd %f, truncating mean %f sd %f", cnt, m, sd, mt,
             sdt);
    checks++;
    if (cnt != 64'd16711680) begin
      failures++;
      $display("expected 16711680 results, got %0d", cnt);
    end
    checks++;
    if (m < 0.255362 || m > 0.256362 || sd < 0.157003 || sd > 0.158003) begin
      failures++;
      $display("lookup divider error statistics off");
    end
    checks++;
    if (mt < 0.487344 || mt > 0.488344 || sdt < 0.289781 || sdt > 0.290781) begin
      failures++;
      $display("truncating divider error statistics off");
    end
    checks++;
    if (big != 0) begin
      failures++;
      $display("%0d results off by more than 1", big);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
