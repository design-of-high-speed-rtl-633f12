// dma_descriptor_buffer: the two-port store for the DMA task table.
//
// It holds up to DEPTH descriptors, each a source and a destination address.
// The write port is used by the CPU side in descriptor transfer mode (mode 0):
// it writes one 16-bit half of an entry per cycle, selected by whalf
// (0 = source address, 1 = destination address). The read port is used by the
// channels in data transfer mode (mode 1): rdata shows entry raddr
// combinationally as a desc_t, so a channel can copy it into its registers in the cycle
// it is granted. Both ports work in the same cycle independently.
//
// The depth of 16 entries is the design's own figure; splitting an entry into
// two 16-bit writes follows from the 16-bit descriptor data pin and is this
// implementation's choice.
module dma_descriptor_buffer
#(
  parameter int unsigned DEPTH = dma_pkg::DESC_DEPTH,
  parameter int unsigned AW    = dma_pkg::ADDR_W
) (
  input  logic                     clk,
  // write port (mode 0)
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     whalf,
  input  logic [AW-1:0]            wdata,
  // read port (mode 1)
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output dma_pkg::desc_t           rdata
);

  logic [AW-1:0] src_mem [DEPTH];
  logic [AW-1:0] dst_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !whalf) src_mem[waddr] <= wdata;
    if (we &&  whalf) dst_mem[waddr] <= wdata;
  end

  assign rdata.src = src_mem[raddr];
  assign rdata.dst = dst_mem[raddr];

  if (AW != dma_pkg::ADDR_W) begin : g_width_check
    $error("dma_descriptor_buffer: AW must equal dma_pkg::ADDR_W (width of desc_t)");
  end

endmodule
