// dma_main: four-channel DMA controller with a descriptor buffer.
//
// The CPU first loads a task table (mode = 0, wr = 1, one 16-bit word per
// clock on din: source address, destination address, source, destination,
// ...; up to 16 descriptors). Setting mode = 1 then both requests the
// transfers and switches the controller into data transfer mode; busy rises
// at once. Idle channels request the next descriptor; the rotating-priority
// arbiter grants one of them (ch0, ch1, ch2, ch3, ch0, ... when all ask); the
// granted channel copies the descriptor into its address registers and moves
// one burst: BURST_LEN words read from the source into its FIFO with rdI set
// and the source address on add, then the same words written from the FIFO to
// the destination on doutI with wrI set and the destination address on add.
// Addresses increment by one per word. When every descriptor has been
// handed out and the last burst is written, busy falls.
//
// Channel data widths are 16, 64, 64 and 128 bits; each FIFO holds 16 words;
// addresses are 16 bits. Only one channel moves data at a time because the
// channels share the add pin.
//
// Timing per descriptor: request, grant and descriptor copy take two cycles,
// the read phase BURST_LEN cycles, the write phase BURST_LEN cycles, and the
// grant release and hand-over two more cycles.
//
// The pins follow the controller's published pin list (din, din0..din3,
// clock, mode, wr, add, dout0..dout3, busy, rd0..rd3, wr0..wr3). The
// synchronous active-low reset rst_n is an addition of this implementation.
module dma_main #(
  parameter int unsigned AW         = dma_pkg::ADDR_W,
  parameter int unsigned CH0_W      = dma_pkg::CH0_W,
  parameter int unsigned CH1_W      = dma_pkg::CH1_W,
  parameter int unsigned CH2_W      = dma_pkg::CH2_W,
  parameter int unsigned CH3_W      = dma_pkg::CH3_W,
  parameter int unsigned FIFO_DEPTH = dma_pkg::FIFO_DEPTH,
  parameter int unsigned DESC_DEPTH = dma_pkg::DESC_DEPTH,
  parameter int unsigned BURST_LEN  = dma_pkg::BURST_LEN
) (
  input  logic             clock,
  input  logic             rst_n,
  input  logic             mode,
  input  logic             wr,
  input  logic [AW-1:0]    din,
  input  logic [CH0_W-1:0] din0,
  input  logic [CH1_W-1:0] din1,
  input  logic [CH2_W-1:0] din2,
  input  logic [CH3_W-1:0] din3,
  output logic [AW-1:0]    add,
  output logic [CH0_W-1:0] dout0,
  output logic [CH1_W-1:0] dout1,
  output logic [CH2_W-1:0] dout2,
  output logic [CH3_W-1:0] dout3,
  output logic             busy,
  output logic             rd0, rd1, rd2, rd3,
  output logic             wr0, wr1, wr2, wr3
);

  localparam int unsigned NCH = dma_pkg::NCH;
  localparam int unsigned DAW = $clog2(DESC_DEPTH);

  logic [NCH-1:0] rq, grant, take, active, rd_v, wr_v;
  logic [AW-1:0]  ch_addr [NCH];
  logic           avail;
  logic           desc_we, desc_whalf;
  logic [DAW-1:0] desc_waddr, desc_raddr;
  logic [AW-1:0]  desc_wdata;
  dma_pkg::desc_t desc_rdata;

  dma_control_unit #(.N(NCH), .DEPTH(DESC_DEPTH), .AW(AW)) u_ctrl (
    .clk        (clock),
    .rst_n      (rst_n),
    .mode       (mode),
    .wr         (wr),
    .din        (din),
    .busy       (busy),
    .desc_we    (desc_we),
    .desc_waddr (desc_waddr),
    .desc_whalf (desc_whalf),
    .desc_wdata (desc_wdata),
    .desc_raddr (desc_raddr),
    .take       (take),
    .ch_active  (active),
    .avail      (avail),
    .remaining  ()
  );

  dma_descriptor_buffer #(.DEPTH(DESC_DEPTH), .AW(AW)) u_desc (
    .clk   (clock),
    .we    (desc_we),
    .waddr (desc_waddr),
    .whalf (desc_whalf),
    .wdata (desc_wdata),
    .raddr (desc_raddr),
    .rdata (desc_rdata)
  );

  dma_rotating_arbiter #(.N(NCH)) u_arb (
    .clk   (clock),
    .rst_n (rst_n),
    .rq    (rq),
    .grant (grant)
  );

  dma_channel #(.DATA_W(CH0_W), .AW(AW), .FIFO_DEPTH(FIFO_DEPTH), .BURST_LEN(BURST_LEN)) u_ch0 (
    .clk(clock), .rst_n(rst_n), .avail(avail), .desc(desc_rdata),
    .take(take[0]), .active(active[0]), .rq(rq[0]), .grant(grant[0]),
    .rd(rd_v[0]), .wr(wr_v[0]), .addr(ch_addr[0]), .din(din0), .dout(dout0)
  );

  dma_channel #(.DATA_W(CH1_W), .AW(AW), .FIFO_DEPTH(FIFO_DEPTH), .BURST_LEN(BURST_LEN)) u_ch1 (
    .clk(clock), .rst_n(rst_n), .avail(avail), .desc(desc_rdata),
    .take(take[1]), .active(active[1]), .rq(rq[1]), .grant(grant[1]),
    .rd(rd_v[1]), .wr(wr_v[1]), .addr(ch_addr[1]), .din(din1), .dout(dout1)
  );

  dma_channel #(.DATA_W(CH2_W), .AW(AW), .FIFO_DEPTH(FIFO_DEPTH), .BURST_LEN(BURST_LEN)) u_ch2 (
    .clk(clock), .rst_n(rst_n), .avail(avail), .desc(desc_rdata),
    .take(take[2]), .active(active[2]), .rq(rq[2]), .grant(grant[2]),
    .rd(rd_v[2]), .wr(wr_v[2]), .addr(ch_addr[2]), .din(din2), .dout(dout2)
  );

  dma_channel #(.DATA_W(CH3_W), .AW(AW), .FIFO_DEPTH(FIFO_DEPTH), .BURST_LEN(BURST_LEN)) u_ch3 (
    .clk(clock), .rst_n(rst_n), .avail(avail), .desc(desc_rdata),
    .take(take[3]), .active(active[3]), .rq(rq[3]), .grant(grant[3]),
    .rd(rd_v[3]), .wr(wr_v[3]), .addr(ch_addr[3]), .din(din3), .dout(dout3)
  );

  dma_address_generator #(.N(NCH), .AW(AW)) u_addr (
    .clk     (clock),
    .rst_n   (rst_n),
    .rd      (rd_v),
    .wr      (wr_v),
    .ch_addr (ch_addr),
    .add     (add)
  );

  assign {rd3, rd2, rd1, rd0} = rd_v;
  assign {wr3, wr2, wr1, wr0} = wr_v;

endmodule
