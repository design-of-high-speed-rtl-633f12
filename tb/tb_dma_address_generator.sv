// tb_dma_address_generator: self-checking test of the shared address output.
//
// Gives each of the four channels a random address, then lets one channel at
// a time read or write (or none) and checks that add equals that channel's
// address, and zero when no channel moves data.
module tb_dma_address_generator;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rd, wr;
  logic [15:0] ch_addr [N];
  logic [15:0] add;
  int checks = 0, failures = 0;

  dma_address_generator #(.N(N), .AW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = '0; wr = '0;
    foreach (ch_addr[i]) ch_addr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int who, how;
      logic [15:0] expv;
      @(negedge clk);
      foreach (ch_addr[k]) ch_addr[k] = 16'($urandom);
      who = $urandom % N; how = $urandom % 3;
      rd = '0; wr = '0;
      if (how == 1) rd[who] = 1'b1;
      if (how == 2) wr[who] = 1'b1;
      expv = (how == 0) ? 16'h0 : ch_addr[who];
      #1;
      checks++;
      if (add !== expv) begin
        failures++;
        $display("FAIL who=%0d how=%0d add=%h exp=%h", who, how, add, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
