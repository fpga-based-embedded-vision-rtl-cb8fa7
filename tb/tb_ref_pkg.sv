// tb_ref_pkg: reference models used by the system testbench.
//
// ref_hsl: the fixed-point RGB to HSL algorithm (halved-sum lumience,
// unsigned hue selection, division as multiplication by an inverse rounded
// to 17 fraction bits followed by rounding, hue offset 42/126/210, saturation
// = rounded half of the Q8.8 quotient, clamped to 255), written from its
// description with the inverse computed in real arithmetic.
// ref_ycc: the JPEG RGB to YCbCr equations with coefficients scaled by 2^17
// (Cr's green coefficient trimmed to -54878 so the row sums to zero), the
// offset 128 * 2^17, rounding on bit 16 and clamping to 0..255.
package tb_ref_pkg;
  import ev_pkg::*;

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

  function automatic int ycc_chan(longint acc);
    longint v;
    if (acc < 0) return 0;
    v = (acc >> 17) + ((acc >> 16) & 1);
    return (v > 255) ? 255 : int'(v);
  endfunction

  function automatic ycc_t ref_ycc(rgb_t p);
    longint r, g, b;
    ycc_t o;
    r = p.r; g = p.g; b = p.b;
    o.y  = 8'(ycc_chan(39191 * r + 76939 * g + 14942 * b));
    o.cb = 8'(ycc_chan((128 << 17) - 22117 * r - 43419 * g + 65536 * b));
    o.cr = 8'(ycc_chan((128 << 17) + 65536 * r - 54878 * g - 10658 * b));
    return o;
  endfunction
endpackage
