// dma_fifo: the data buffer of one DMA channel.
//
// A single-clock first-word-fall-through FIFO: dout always shows the oldest
// stored word, so a channel can present it to the destination in the same
// cycle it pops it. Storage is a WIDTH x DEPTH array with wrapping read and
// write pointers and an occupancy counter. push and pop may happen in the same
// cycle, also when the FIFO is full. A push into a full FIFO without a pop, or
// a pop from an empty one, is ignored (and flagged by an assertion in
// simulation). Timing: a pushed word can be seen on dout, and popped, from the
// next cycle on; full, empty and count change at the clock edge.
//
// Sizes follow the channel table of the design: 16, 64, 64 and 128 bits wide,
// 16 words deep. The design calls these buffers asynchronous, but the
// controller has a single clock pin, so this is a synchronous FIFO: that is
// this implementation's choice.
module dma_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && (!full || do_pop);
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // synthesis-neutral protocol checks
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
