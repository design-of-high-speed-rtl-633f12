// dma_rotating_arbiter: rotating-priority arbiter for the DMA channels.
//
// Channel i raises rq[i] to ask for the next descriptor and the shared bus.
// The arbiter grants one requester at a time with a registered one-hot grant
// and keeps the grant for as long as that channel holds rq high. When the
// granted channel drops rq the grant is removed in the next cycle, and the
// cycle after a free one a new winner is chosen.
//
// Priority rotates: after reset the order is ch0, ch1, ch2, ch3 (ch0 highest).
// Each time channel k is granted, channel k+1 becomes the highest and k the
// lowest, so with all channels requesting they are served ch0, ch1, ch2, ch3,
// ch0, ... The start order and the ring come from the design; holding a grant
// until rq falls and the one-cycle gap after release are this
// implementation's choices.
//
// Timing: rq[i] high in cycle t with no grant outstanding gives grant in
// cycle t+1.
module dma_rotating_arbiter #(
  parameter int unsigned N = dma_pkg::NCH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] rq,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;       // index of the current highest-priority channel
  logic [N-1:0]  pick;      // one-hot winner among rq, searched from ptr
  logic [IW-1:0] pick_idx;
  logic          pick_any;

  always_comb begin
    pick     = '0;
    pick_idx = '0;
    pick_any = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + i) % N);
      if (!pick_any && rq[idx]) begin
        pick_any      = 1'b1;
        pick[idx]     = 1'b1;
        pick_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= '0;
      ptr   <= '0;
    end else if (grant != '0) begin
      if ((grant & rq) == '0) grant <= '0;   // holder finished: release
    end else if (pick_any) begin
      grant <= pick;
      ptr   <= (pick_idx == IW'(N - 1)) ? '0 : pick_idx + 1'b1;
    end
  end

  a_grant_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_to_requester: assert property (@(posedge clk) disable iff (!rst_n)
                                         (grant != '0 && $past(grant) == '0) |-> ((grant & $past(rq)) != '0));

endmodule
