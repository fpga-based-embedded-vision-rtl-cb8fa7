// ev_pkg: types and constants shared by the colour object location pipeline.
//
// Pixels travel between blocks as packed three-channel structs of 8-bit
// samples. The lookup-table divider's inverse table and the fixed-point
// YCbCr coefficients are defined here so that the RTL and its testbenches use
// one definition of each constant.
//
// Inverse table: INV[d] = Round(2^17 / d) for d = 1..255 (17 fraction bits,
// the widest unsigned operand of an 18x18 signed hardware multiplier). The
// entry for d = 1 is 2^17 itself, so entries are stored 18 bits wide; the
// entry for d = 0 is unused (the divider flags division by zero separately).
// YCbCr coefficients are the JPEG matrix scaled by 2^17 and rounded, with the
// two chroma rows trimmed so that each sums to exactly zero (a grey pixel
// gives Cb = Cr = 128).
package ev_pkg;

  // ---------------------------------------------------------------- pixels
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] h;   // 0..252, 255 = grey (hue undefined)
    logic [7:0] s;
    logic [7:0] l;
  } hsl_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycc_t;

  // Generic three-channel sample as seen by the thresholder.
  typedef logic [2:0][7:0] chan3_t;

  // Brightest RGB channel, as reported by the HSL Pre-Calc stage.
  typedef enum logic [1:0] {
    MAXCH_R = 2'd0,
    MAXCH_G = 2'd1,
    MAXCH_B = 2'd2
  } max_chan_e;

  // Which colour space feeds the thresholder in the complete system.
  typedef enum logic {
    SPACE_HSL   = 1'b0,
    SPACE_YCBCR = 1'b1
  } colour_space_e;

  // -------------------------------------------------- lookup-table divider
  localparam int unsigned DIV_FRAC_BITS = 17;
  localparam int unsigned INV_W         = DIV_FRAC_BITS + 1;

  typedef logic [INV_W-1:0] inv_table_t [256];

  // Round(2^17 / d) computed as floor((2^18 / d + 1) / 2); no entry is an
  // exact tie, so this is plain round-to-nearest.
  function automatic inv_table_t gen_inv_table();
    inv_table_t t;
    t[0] = '0;
    for (int unsigned d = 1; d < 256; d++) begin
      t[d] = INV_W'((((64'd1 << (DIV_FRAC_BITS + 1)) / 64'(d)) + 64'd1) >> 1);
    end
    return t;
  endfunction

  // ------------------------------------------------------- YCbCr constants
  localparam int unsigned YCC_FRAC = 17;
  // Row order: Y, Cb, Cr. Column order: R, G, B. Signed Q1.17.
  localparam int YCC_COEF [3][3] = '{
    '{ 39191,  76939,  14942},   // Y  = 0.299 R + 0.587 G + 0.114 B
    '{-22117, -43419,  65536},   // Cb = -0.168736 R - 0.331264 G + 0.5 B
    '{ 65536, -54878, -10658}    // Cr = 0.5 R - 0.418688 G - 0.081312 B
  };
  localparam int YCC_OFFS [3] = '{0, 128 << YCC_FRAC, 128 << YCC_FRAC};

  // Hue scale and offsets (Eq. for 8-bit hue: 60 degrees -> 42 codes).
  localparam logic [7:0] HUE_SCALE  = 8'd42;
  localparam logic [7:0] HUE_OFF_R  = 8'd42;
  localparam logic [7:0] HUE_OFF_G  = 8'd126;
  localparam logic [7:0] HUE_OFF_B  = 8'd210;
  localparam logic [7:0] HUE_GREY   = 8'd255;

endpackage
