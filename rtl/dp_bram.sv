// dp_bram: simple dual-port block RAM, one write port and one read port.
//
// A write (we, waddr, wdata) lands on the rising clock edge. A read presents
// raddr and returns mem[raddr] in rdata one clock edge later (registered
// output, as in an FPGA block RAM). Reading the address being written in the
// same cycle returns the old contents. Contents are not reset.
module dp_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 10,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
