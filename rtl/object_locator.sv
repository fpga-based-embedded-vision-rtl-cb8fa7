// object_locator: row and column histograms of a binary object mask.
//
// A mask stream (1 = pixel belongs to the object) arrives in raster order,
// NCOLS pixels per row. For every column the module counts the mask bits in
// that column (hist_col) and for every row the mask bits in that row
// (hist_row). The counts are kept in one dual-port block RAM:
//   address c           (0 <= c < NCOLS)  column count of column c
//   address NCOLS + r                     row count of row r
// The centroid, spread and orientation of the object are then computed from
// the two histograms by whoever reads them (this block does not divide).
//
// Column counts are updated read-modify-write: while pixel c is counted the
// RAM is already asked for column c+1, so its old count is ready the next
// cycle and one pixel is taken every cycle. Row 0 writes its bits directly,
// so the RAM needs no clearing between frames. After the last pixel of a row
// one extra "cool-down" cycle writes the row count; in_ack is low in that
// cycle. A frame of W x H pixels therefore takes W*H + H cycles. This is the
// published algorithm, including the address map and the cool-down cycle.
//
// This design's own choices: the row length is loaded from num_cols when
// `clear` is asserted (reset loads DEFAULT_COLS, the 352-pixel CIF width);
// counts are CNT_W = 10 bits and wrap beyond 1023; a row count whose address
// would fall outside the RAM is dropped and sets the sticky hist_ovf flag;
// and the histograms are read out through a host port that borrows the RAM
// read port. hist_rd_en/hist_rd_addr give hist_rd_data one cycle later with
// hist_rd_valid. A host read displaces the prefetched column count, so in_ack
// is held low for the cycle after a host read while it is fetched again.
//
// clear: start a new frame (row and column 0) and load the row length.
module object_locator #(
  parameter int unsigned DEPTH        = 1024,
  parameter int unsigned CNT_W        = 10,
  parameter int unsigned DEFAULT_COLS = 352,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  logic             clear,
  input  logic [AW-1:0]    num_cols,
  // mask stream
  input  logic             in_rts,
  output logic             in_ack,
  input  logic             in_pix,
  // histogram read port
  input  logic             hist_rd_en,
  input  logic [AW-1:0]    hist_rd_addr,
  output logic             hist_rd_valid,
  output logic [CNT_W-1:0] hist_rd_data,
  // status
  output logic [AW-1:0]    rows_done,
  output logic             hist_ovf
);
  logic [AW-1:0]    ncols, cur_col, cur_row;
  logic [CNT_W-1:0] row_acc;
  logic             cool;
  logic             rd_block;

  // RAM ports
  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [CNT_W-1:0] wdata, rdata;

  logic             take;
  logic [AW-1:0]    cur_col_nx;
  logic [AW:0]      row_addr;

  assign in_ack = !cool && !clear && !rd_block;
  assign take   = in_rts && in_ack;
  assign row_addr = {1'b0, ncols} + {1'b0, cur_row};

  always_comb begin
    we         = 1'b0;
    waddr      = cur_col;
    wdata      = '0;
    cur_col_nx = cur_col;
    if (cool) begin
      we    = (row_addr < (AW+1)'(DEPTH));
      waddr = row_addr[AW-1:0];
      wdata = row_acc;
    end else if (clear) begin
      cur_col_nx = '0;
    end else if (take) begin
      we    = 1'b1;
      waddr = cur_col;
      wdata = (cur_row == '0) ? CNT_W'(in_pix) : rdata + CNT_W'(in_pix);
      cur_col_nx = (cur_col == ncols - AW'(1)) ? '0 : cur_col + AW'(1);
    end
    // Prefetch the column that will be counted next, unless the host reads.
    raddr = hist_rd_en ? hist_rd_addr : cur_col_nx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncols    <= AW'(DEFAULT_COLS);
      cur_col  <= '0;
      cur_row  <= '0;
      row_acc  <= '0;
      cool     <= 1'b0;
      rd_block <= 1'b0;
      hist_ovf <= 1'b0;
    end else begin
      rd_block <= hist_rd_en;
      cur_col  <= cur_col_nx;
      if (cool) begin
        cur_row <= cur_row + AW'(1);
        row_acc <= '0;
        cool    <= 1'b0;
        if (!we) hist_ovf <= 1'b1;
      end else if (clear) begin
        ncols    <= num_cols;
        cur_row  <= '0;
        row_acc  <= '0;
        hist_ovf <= 1'b0;
      end else if (take) begin
        row_acc <= row_acc + CNT_W'(in_pix);
        if (cur_col == ncols - AW'(1)) cool <= 1'b1;
      end
    end
  end

  dp_bram #(.DEPTH(DEPTH), .W(CNT_W)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  assign hist_rd_valid = rd_block;
  assign hist_rd_data  = rdata;
  assign rows_done     = cur_row;
endmodule
