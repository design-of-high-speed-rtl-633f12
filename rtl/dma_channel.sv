// dma_channel: one DMA channel, its channel register and its control unit.
//
// The channel register holds a 16-bit source and a 16-bit destination
// address. While idle the channel requests (rq) whenever the task table still
// has a descriptor (avail). When the arbiter grants it, the channel copies the
// descriptor offered by the descriptor buffer into its registers and pulses
// take for one cycle, so the control unit moves on to the next descriptor.
//
// It then moves BURST_LEN words in two phases:
//   LOAD  : rd is set, addr is the source address, the word on din is pushed
//           into the FIFO at the clock edge, and the source address increments.
//   STORE : wr is set, addr is the destination address, dout shows the FIFO's
//           oldest word which the destination takes at the clock edge, and the
//           destination address increments.
// One word moves per clock in each phase. A DONE cycle follows with rq low, so
// the arbiter releases the grant and passes it on; then the channel is idle
// again. rq stays high from the grant to the end of STORE.
//
// The registers, FIFO, rq/grant, rd/wr and address auto-increment follow the
// design. The burst length, the one-word-per-cycle zero-wait bus (source data
// valid in the same cycle as rd and addr) and dout reading zero outside STORE
// are this implementation's choices.
module dma_channel #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned AW         = dma_pkg::ADDR_W,
  parameter int unsigned FIFO_DEPTH = dma_pkg::FIFO_DEPTH,
  parameter int unsigned BURST_LEN  = dma_pkg::BURST_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the control unit and descriptor buffer
  input  logic              avail,
  input  dma_pkg::desc_t   desc,
  output logic              take,
  output logic              active,
  // to and from the arbiter
  output logic              rq,
  input  logic              grant,
  // source and destination side
  output logic              rd,
  output logic              wr,
  output logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned CW = $clog2(BURST_LEN);

  dma_pkg::ch_state_t state;
  logic [AW-1:0]     src_q, dst_q;
  logic [CW-1:0]     beat;
  logic              last_beat;
  logic [DATA_W-1:0] fifo_dout;
  logic              fifo_full, fifo_empty;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  assign take      = (state == dma_pkg::CH_IDLE) && grant && avail;
  assign rd        = (state == dma_pkg::CH_LOAD);
  assign wr        = (state == dma_pkg::CH_STORE);
  assign active    = (state != dma_pkg::CH_IDLE);
  assign rq        = ((state == dma_pkg::CH_IDLE) && avail) || rd || wr;
  assign addr      = wr ? dst_q : (rd ? src_q : '0);
  assign dout      = wr ? fifo_dout : '0;
  assign last_beat = (beat == CW'(BURST_LEN - 1));

  dma_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (rd),
    .din   (din),
    .pop   (wr),
    .dout  (fifo_dout),
    .full  (fifo_full),
    .empty (fifo_empty),
    .count (fifo_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= dma_pkg::CH_IDLE;
      src_q <= '0;
      dst_q <= '0;
      beat  <= '0;
    end else begin
      unique case (state)
        dma_pkg::CH_IDLE: if (take) begin
          src_q <= desc.src;
          dst_q <= desc.dst;
          beat  <= '0;
          state <= dma_pkg::CH_LOAD;
        end
        dma_pkg::CH_LOAD: begin
          src_q <= src_q + 1'b1;
          beat  <= last_beat ? '0 : beat + 1'b1;
          if (last_beat) state <= dma_pkg::CH_STORE;
        end
        dma_pkg::CH_STORE: begin
          dst_q <= dst_q + 1'b1;
          beat  <= last_beat ? '0 : beat + 1'b1;
          if (last_beat) state <= dma_pkg::CH_DONE;
        end
        dma_pkg::CH_DONE: state <= dma_pkg::CH_IDLE;
        default: state <= dma_pkg::CH_IDLE;
      endcase
    end
  end

  // A burst must fit the FIFO: the FIFO is never pushed when full or popped
  // when empty.
  if (AW != dma_pkg::ADDR_W) begin : g_width_check
    $error("dma_channel: AW must equal dma_pkg::ADDR_W (width of desc_t)");
  end
  initial assert (BURST_LEN >= 2 && BURST_LEN <= FIFO_DEPTH)
    else $error("BURST_LEN must lie between 2 and FIFO_DEPTH");
  a_load_not_full:   assert property (@(posedge clk) disable iff (!rst_n) rd |-> !fifo_full);
  a_store_not_empty: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !fifo_empty);
  a_store_done_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                       (state == dma_pkg::CH_DONE) |-> (fifo_count == '0));

endmodule
