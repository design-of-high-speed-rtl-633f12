// tb_dma_control_unit: self-checking test of the mode control and task-table
// sequencing.
//
// Rounds of: write a table of random length in mode 0 (sometimes an odd
// number of words, sometimes more than 16 entries), checking every
// descriptor-buffer write strobe, address, half and data; switch to mode 1
// and hand out the descriptors with take pulses from random channels,
// checking avail, the remaining count, the read address and busy; keep a
// channel active after the last descriptor and check busy only falls when it
// goes idle; return to mode 0 and check the table restarts at entry 0.
module tb_dma_control_unit;
  localparam int N = 4;
  localparam int D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mode, wr, busy, desc_we, desc_whalf, avail;
  logic [15:0] din, desc_wdata;
  logic [3:0] desc_waddr, desc_raddr;
  logic [N-1:0] take, ch_active;
  logic [4:0] remaining;
  int checks = 0, failures = 0;
  int mode_switches = 0, overflows = 0, odd_tables = 0;

  dma_control_unit #(.N(N), .DEPTH(D), .AW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    mode = 0; wr = 0; din = 0; take = 0; ch_active = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      int words, entries;
      words = (round % 4 == 3) ? 2 * D + 4 : 1 + $urandom % (2 * D);
      if (words % 2) odd_tables++;
      if (words > 2 * D) overflows++;
      entries = (words > 2 * D) ? D : words / 2;
      // mode 0: write the table, with an idle gap in the middle
      for (int w = 0; w < words; w++) begin
        @(negedge clk);
        if (w == 3) begin
          wr = 0; #1;
          check(!desc_we, "no write without wr");
          @(negedge clk);
        end
        wr = 1; din = 16'($urandom);
        #1;
        check(!busy && !avail, "idle in mode 0");
        if (w < 2 * D) begin
          check(desc_we, "write strobe");
          check(desc_waddr == 4'(w / 2) && desc_whalf == 1'(w % 2), "write address/half");
          check(desc_wdata == din, "write data");
        end else begin
          check(!desc_we, "write beyond 16 entries dropped");
        end
      end
      @(negedge clk);
      wr = 0;
      // mode 1
      mode = 1; mode_switches++;
      #1;
      check(busy == (entries > 0), "busy on entering mode 1");
      for (int e = 0; e < entries; e++) begin
        int c;
        @(negedge clk);
        wr = 1; #1;                         // writes are ignored in mode 1
        check(!desc_we, "no write in mode 1");
        check(avail && int'(remaining) == entries - e, "remaining count");
        check(desc_raddr == 4'(e), "read address");
        check(busy, "busy while descriptors left");
        c = $urandom % N;
        take = N'(1) << c; ch_active = take;
        @(posedge clk); #1;
        take = 0; wr = 0;
      end
      @(negedge clk);
      #1;
      check(!avail && remaining == 0, "descriptor count reached 0");
      check(busy == (entries > 0), "busy while a channel still active");
      ch_active = 0;
      #1;
      check(!busy, "busy falls when all done");
      @(negedge clk);
      mode = 0;
      @(negedge clk);
    end
    check(mode_switches == 12 && overflows > 0 && odd_tables >= 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
