// dma_pkg: constants and types shared by the four-channel DMA controller.
//
// The controller has four channels of 16, 64, 64 and 128 data bits, each with
// a 16-entry FIFO, a 16-entry descriptor buffer holding the task table and a
// 16-bit address bus. A descriptor (desc_t) is one source/destination address
// pair.
// BURST_LEN, the number of data words one descriptor moves, is this design's
// own choice: it equals the FIFO depth, so a burst is read completely into
// the FIFO before it is written out.
package dma_pkg;

  localparam int unsigned NCH        = 4;   // channels ch0..ch3
  localparam int unsigned ADDR_W     = 16;  // add(15:0), 16-bit channel address registers
  localparam int unsigned DESC_DEPTH = 16;  // descriptor buffer entries
  localparam int unsigned FIFO_DEPTH = 16;  // words per channel FIFO
  localparam int unsigned BURST_LEN  = 16;  // words per descriptor (own choice)

  localparam int unsigned CH0_W = 16;
  localparam int unsigned CH1_W = 64;
  localparam int unsigned CH2_W = 64;
  localparam int unsigned CH3_W = 128;

  // The two operating modes selected by the mode pin.
  typedef enum logic {
    MODE_DESC = 1'b0,   // descriptor transfer: the CPU loads the task table
    MODE_DATA = 1'b1    // data transfer: the channels execute the table
  } dma_mode_e;

  // One task-table entry: where a burst is read from and written to.
  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
  } desc_t;

  // Channel control states. LOAD = reading the source into the FIFO (rd set),
  // STORE = writing the FIFO out to the destination (wr set).
  typedef enum logic [1:0] {
    CH_IDLE  = 2'd0,
    CH_LOAD  = 2'd1,
    CH_STORE = 2'd2,
    CH_DONE  = 2'd3
  } ch_state_t;

endpackage
