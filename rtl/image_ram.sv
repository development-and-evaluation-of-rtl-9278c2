// image_ram: the single-port frame buffer that holds the input image in row
// order (pixel (y,x) at address y*32+x). It has one port, so at most one
// pixel is read or written per clock; this is the bandwidth limit the two
// segmentation units are built around. A write (we=1) stores wdata at addr;
// otherwise the port reads, and rdata shows the addressed pixel one clock
// later (registered read, as in an FPGA block RAM). Contents are not reset.
module image_ram
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = IMG_SIDE * IMG_SIDE,  // 1024 pixels
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  pix_t          wdata,
  output pix_t          rdata
);
  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
