// dma_address_generator: drives the controller's single address output.
//
// All four channels share the add(15:0) pin. Each channel keeps its own
// auto-incrementing source and destination address; this block places on add
// the address of the channel that is currently reading (rd) or writing (wr),
// and zero when no channel is. Because the arbiter grants one channel at a
// time, at most one channel is ever moving data; an assertion checks this.
// Combinational: add changes in the same cycle as rd/wr.
//
// The design names this block and its 16-bit output; how it forms the address
// is this implementation's choice.
module dma_address_generator #(
  parameter int unsigned N  = dma_pkg::NCH,
  parameter int unsigned AW = dma_pkg::ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  rd,
  input  logic [N-1:0]  wr,
  input  logic [AW-1:0] ch_addr [N],
  output logic [AW-1:0] add
);

  logic [N-1:0] moving;
  assign moving = rd | wr;

  always_comb begin
    add = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (moving[i]) add = add | ch_addr[i];
    end
  end

  a_one_mover: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(moving));
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (!rst_n) (rd & wr) == '0);

endmodule
