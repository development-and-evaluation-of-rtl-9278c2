// one_port_bram: one port of a dual-port FPGA block RAM used as an
// independent single-port buffer (1 KiB = 32 partitions of 32 bytes). Each
// partition holds one 25-pixel small receptive field vector at offsets 0..24,
// so the address of pixel p of the vector in partition s is s*32+p. The
// segmentation unit writes the buffer; the processing elements then read it.
// A write stores wdata at addr on the clock edge; rdata is the registered read
// of addr (one clock latency). Contents are not reset.
module one_port_bram
  import cnn_pkg::*;
#(
  parameter int unsigned N_PARTS    = N_PART,      // 32 partitions
  parameter int unsigned PART_SIZE  = PART_BYTES,  // 32 bytes each
  parameter int unsigned AW         = $clog2(N_PARTS * PART_SIZE)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  pix_t          wdata,
  output pix_t          rdata
);
  pix_t mem [N_PARTS * PART_SIZE];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
