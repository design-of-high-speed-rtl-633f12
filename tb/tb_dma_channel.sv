// tb_dma_channel: self-checking test of one 64-bit DMA channel.
//
// The testbench plays the arbiter (grant one cycle after rq, removed one cycle
// after rq falls), the descriptor buffer (a random source/destination pair)
// and the source and destination memories (source word = a hash of its
// address, returned in the same cycle as rd; destination words recorded at
// each clock edge with wr). For each of several descriptors, including one
// whose addresses wrap past 0xFFFF, it checks: rq only while a descriptor is
// available, a single take pulse on grant, exactly 16 rd cycles on the
// incrementing source addresses, then exactly 16 wr cycles on the
// incrementing destination addresses carrying the source words in order,
// and rq dropping right after the write phase.
module tb_dma_channel;
  localparam int W = 64;
  localparam int BL = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic avail, take, active, rq, grant, rd, wr;
  logic [15:0] addr;
  dma_pkg::desc_t desc;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  dma_channel #(.DATA_W(W), .AW(16), .FIFO_DEPTH(16), .BURST_LEN(BL)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] src_word(logic [15:0] a);
    return {16'hA5A5 ^ a, a * 16'd7, ~a, a + 16'h1234};
  endfunction

  assign din = rd ? src_word(addr) : '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // testbench arbiter: registered grant held while rq is high
  always_ff @(posedge clk) begin
    if (!rst_n) grant <= 1'b0;
    else        grant <= rq;
  end

  initial begin
    logic [15:0] s, d;
    int rd_cycles, wr_cycles, takes;
    avail = 0; desc = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // no descriptor: no request
    repeat (5) begin
      @(negedge clk);
      check(!rq && !active && !rd && !wr, "quiet without descriptor");
    end
    for (int n = 0; n < 6; n++) begin
      s = (n == 5) ? 16'hFFF8 : 16'($urandom);
      d = (n == 5) ? 16'hFFFC : 16'($urandom);
      @(negedge clk);
      avail = 1; desc.src = s; desc.dst = d;
      #1 check(rq, "rq when descriptor available");
      rd_cycles = 0; wr_cycles = 0; takes = 0;
      // wait for take
      while (!take) begin @(negedge clk); end
      check(grant, "take only with grant");
      takes++;
      @(posedge clk); #1;
      avail = 0; desc.src = 16'hDEAD; desc.dst = 16'hBEEF;  // registers must hold their copy
      for (int k = 0; k < BL; k++) begin
        check(rd && !wr && rq, "read phase flags");
        check(addr == 16'(s + k), "source address increments");
        check(!take, "single take");
        rd_cycles += rd;
        @(posedge clk); #1;
      end
      for (int k = 0; k < BL; k++) begin
        check(wr && !rd && rq, "write phase flags");
        check(addr == 16'(d + k), "destination address increments");
        check(dout == src_word(16'(s + k)), "destination data in order");
        wr_cycles += wr;
        @(posedge clk); #1;
      end
      check(!rd && !wr && !rq, "rq dropped after burst");
      check(dout == '0, "dout idle value");
      check(rd_cycles == BL && wr_cycles == BL && takes == 1, "burst cycle counts");
      @(posedge clk); #1;
      check(!active, "idle again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
