// dma_control_unit: mode control and task-table sequencing of the DMA.
//
// Mode 0 (descriptor transfer): every clock in which wr is high, the 16-bit
// word on din is written into the descriptor buffer. Words alternate between
// the source and the destination address of an entry, entry 0 first, so a
// table of n descriptors takes 2n write cycles; writes beyond the buffer's
// DEPTH entries are dropped. Only complete entries count.
//
// Mode 1 (data transfer): the number of descriptors still to hand out is the
// entry count minus the read pointer. While it is not zero, avail tells the
// idle channels to request; each take pulse from a granted channel advances
// the read pointer. When it reaches zero ("descriptor number 0") no channel
// requests any more, and once every channel is idle again busy falls.
// busy = mode & (descriptors left or a channel still moving): it rises in the
// cycle mode goes to 1 and acts as the acknowledgement of that request.
//
// Returning from mode 1 to mode 0 empties the table, so the CPU writes a new
// one from entry 0. Writes in mode 1 are ignored.
//
// Mode, wr, busy and the descriptor-count termination follow the design; the
// word order of the table, the count taken from the number of words written
// and the clearing on return to mode 0 are this implementation's choices.
module dma_control_unit #(
  parameter int unsigned N     = dma_pkg::NCH,
  parameter int unsigned DEPTH = dma_pkg::DESC_DEPTH,
  parameter int unsigned AW    = dma_pkg::ADDR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU side
  input  logic                     mode,
  input  logic                     wr,
  input  logic [AW-1:0]            din,
  output logic                     busy,
  // descriptor buffer write port
  output logic                     desc_we,
  output logic [$clog2(DEPTH)-1:0] desc_waddr,
  output logic                     desc_whalf,
  output logic [AW-1:0]            desc_wdata,
  // descriptor buffer read port
  output logic [$clog2(DEPTH)-1:0] desc_raddr,
  // channels
  input  logic [N-1:0]             take,
  input  logic [N-1:0]             ch_active,
  output logic                     avail,
  output logic [$clog2(DEPTH+1)-1:0] remaining
);

  localparam int unsigned EW = $clog2(DEPTH + 1);     // entry count width
  localparam int unsigned HW = $clog2(2 * DEPTH + 1); // half-word count width

  dma_pkg::dma_mode_e mode_e, mode_q;
  logic          leave1;        // mode 1 -> 0 this cycle
  logic [HW-1:0] wptr;          // half-words written so far
  logic [HW-1:0] wptr_eff;
  logic [EW-1:0] rptr;          // next descriptor to hand out
  logic [EW-1:0] n_entries;
  logic [EW-1:0] rptr_eff;

  assign mode_e     = dma_pkg::dma_mode_e'(mode);
  assign leave1     = (mode_q == dma_pkg::MODE_DATA) && (mode_e == dma_pkg::MODE_DESC);
  assign wptr_eff   = leave1 ? '0 : wptr;
  assign rptr_eff   = leave1 ? '0 : rptr;

  assign desc_we    = (mode_e == dma_pkg::MODE_DESC) && wr && (wptr_eff < HW'(2 * DEPTH));
  assign desc_waddr = wptr_eff[$clog2(DEPTH):1];
  assign desc_whalf = wptr_eff[0];
  assign desc_wdata = din;

  assign n_entries  = EW'(wptr >> 1);
  assign remaining  = (mode_e == dma_pkg::MODE_DATA) ? (n_entries - rptr) : '0;
  assign avail      = (remaining != '0);
  assign desc_raddr = rptr[$clog2(DEPTH)-1:0];
  assign busy       = (mode_e == dma_pkg::MODE_DATA) && (avail || (ch_active != '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q <= dma_pkg::MODE_DESC;
      wptr   <= '0;
      rptr   <= '0;
    end else begin
      mode_q <= mode_e;
      wptr   <= desc_we ? wptr_eff + 1'b1 : wptr_eff;
      rptr   <= ((mode_e == dma_pkg::MODE_DATA) && (take != '0)) ? rptr_eff + 1'b1 : rptr_eff;
    end
  end

  a_take_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(take));
  a_take_valid:   assert property (@(posedge clk) disable iff (!rst_n) (take != '0) |-> avail);

endmodule
