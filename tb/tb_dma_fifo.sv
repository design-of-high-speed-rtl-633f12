// tb_dma_fifo: self-checking test of the channel FIFO.
//
// Drives random push/pop traffic (with runs that fill the FIFO to its 16
// words and drain it empty) into a 64-bit x 16 FIFO and compares dout, full,
// empty and count every cycle against a queue model kept in the testbench.
// Pushes into a full FIFO and pops from an empty one are never issued, since
// the FIFO's assertions reject them.
module tb_dma_fifo;
  localparam int W = 64;
  localparam int D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty_after_full = 0;
  logic [W-1:0] model[$];

  dma_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 200) % 3;  // 0: mostly push, 1: mostly pop, 2: mixed
      @(negedge clk);
      // compare current outputs with the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "dout head");
      if (full) saw_full++;
      if (empty && saw_full > 0) saw_empty_after_full++;
      case (phase)
        0: begin push = ($urandom % 4) != 0; pop = ($urandom % 4) == 0; end
        1: begin push = ($urandom % 4) == 0; pop = ($urandom % 4) != 0; end
        default: begin push = $urandom % 2; pop = $urandom % 2; end
      endcase
      if (full && !pop) push = 0;
      if (empty) pop = 0;
      din = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(saw_full > 0, "FIFO reached full");
    check(saw_empty_after_full > 0, "FIFO drained after full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
