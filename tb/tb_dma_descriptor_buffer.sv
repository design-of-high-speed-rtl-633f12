// tb_dma_descriptor_buffer: self-checking test of the task-table store.
//
// Writes all 16 entries half by half (source, then destination) with random
// addresses, reads every entry back through the read port, then rewrites
// random halves while reading a different entry in the same cycle, checking
// that both ports work independently and that a half-write leaves the other
// half intact. The expected table is kept in testbench arrays.
module tb_dma_descriptor_buffer;
  localparam int D = 16;

  logic clk = 1'b0;
  logic we, whalf;
  logic [3:0] waddr, raddr;
  logic [15:0] wdata;
  dma_pkg::desc_t rdata;
  logic [15:0] exp_src [D], exp_dst [D];
  int checks = 0, failures = 0;

  dma_descriptor_buffer #(.DEPTH(D), .AW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_half(int a, bit h, logic [15:0] v);
    @(negedge clk);
    we = 1; waddr = 4'(a); whalf = h; wdata = v;
    @(posedge clk); #1;
    we = 0;
    if (h) exp_dst[a] = v; else exp_src[a] = v;
  endtask

  initial begin
    we = 0; whalf = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < D; a++) begin
      write_half(a, 1'b0, 16'($urandom));
      write_half(a, 1'b1, 16'($urandom));
    end
    for (int a = 0; a < D; a++) begin
      @(negedge clk); raddr = 4'(a); #1;
      check(rdata.src == exp_src[a], "src readback");
      check(rdata.dst == exp_dst[a], "dst readback");
    end
    // simultaneous write and read of different entries
    for (int i = 0; i < 200; i++) begin
      int a, r;
      bit h;
      logic [15:0] v;
      a = $urandom % D; r = (a + 1 + $urandom % (D - 1)) % D; h = 1'($urandom); v = 16'($urandom);
      @(negedge clk);
      we = 1; waddr = 4'(a); whalf = h; wdata = v; raddr = 4'(r);
      #1;
      check(rdata.src == exp_src[r] && rdata.dst == exp_dst[r], "read during write");
      @(posedge clk); #1;
      we = 0;
      if (h) exp_dst[a] = v; else exp_src[a] = v;
      raddr = 4'(a); #1;
      check(rdata.src == exp_src[a] && rdata.dst == exp_dst[a], "half write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
