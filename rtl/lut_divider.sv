// lut_divider: fully pipelined 16-bit by 8-bit unsigned lookup-table divider.
//
// Division is done as multiplication by a precomputed inverse:
//   quot = Round( num * Round(2^17 / den) / 2^17 )
// Stage 1 looks the inverse up in a 256-entry ROM (one block RAM on an FPGA)
// and registers the numerator; stage 2 multiplies (one hardware multiplier)
// and rounds by adding 2^16 before dropping the 17 fraction bits. Rounding
// both the inverse and the result halves the mean error of truncating
// (non-restoring) division. The inverse width is fixed at 17 fraction bits,
// so no per-denominator width table is needed.
//
// Interface: in_valid/num/den/tag are taken when `en` is high; results appear
// on out_valid/quot/out_tag exactly two enabled clock edges later. `en` stalls
// the whole pipeline (used by an enclosing pipelined block); with en tied high
// the divider accepts and returns one division per cycle. `tag` is carried
// alongside unchanged so that an enclosing block can pass its own state
// through the divider.
//
// Division by zero is not defined by the algorithm; this design returns the
// largest quotient (all ones) and raises out_dz.
module lut_divider
  import ev_pkg::*;
#(
  parameter int unsigned NUM_W = 16,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [7:0]       den,
  input  logic [TAG_W-1:0] tag,
  output logic             out_valid,
  output logic [NUM_W-1:0] quot,
  output logic             out_dz,
  output logic [TAG_W-1:0] out_tag
);
  localparam inv_table_t INV = gen_inv_table();
  localparam int unsigned PROD_W = NUM_W + INV_W;

  // Stage 1: inverse lookup.
  logic             v1;
  logic [INV_W-1:0] inv1;
  logic [NUM_W-1:0] num1;
  logic             dz1;
  logic [TAG_W-1:0] tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      inv1 <= '0;
      num1 <= '0;
      dz1  <= 1'b0;
      tag1 <= '0;
    end else if (en) begin
      v1   <= in_valid;
      inv1 <= INV[den];
      num1 <= num;
      dz1  <= (den == '0);
      tag1 <= tag;
    end
  end

  // Stage 2: multiply and round.
  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] prod_rnd;
  logic [PROD_W-1:0] q_full;

  always_comb begin
    prod     = PROD_W'(num1) * PROD_W'(inv1);
    prod_rnd = prod + (PROD_W'(1) << (DIV_FRAC_BITS - 1));
    q_full   = prod_rnd >> DIV_FRAC_BITS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      quot      <= '0;
      out_dz    <= 1'b0;
      out_tag   <= '0;
    end else if (en) begin
      out_valid <= v1;
      out_dz    <= dz1;
      out_tag   <= tag1;
      if (dz1 || (q_full >> NUM_W) != '0) quot <= '1;
      else                                 quot <= q_full[NUM_W-1:0];
    end
  end
endmodule
