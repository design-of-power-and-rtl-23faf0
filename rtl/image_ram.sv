// image_ram: simple dual-port pixel memory that holds the input image.
//
// DEPTH words of DATA_W bits, one write port and one read port on the same
// clock. A write (we high) stores wdata at waddr at the clock edge. A read
// (re high) returns the word at raddr on rdata after that clock edge (one
// cycle of latency), and rdata holds its value while re is low. A read and a
// write of the same address in the same cycle return the old word.
// The array is not reset; it is meant to be filled before it is read.
// Pixels are stored in raster order, address = row*IMG_W + column.
module image_ram #(
  parameter int unsigned DATA_W = 1,
  parameter int unsigned DEPTH  = 16384,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (re) begin
      rdata <= mem[raddr];
    end
  end
endmodule
