// tb_dma_rotating_arbiter: self-checking test of the rotating-priority arbiter.
//
// Part 1: all four channels request continuously, each releasing one cycle
// after being granted; the grants must come in the order ch0, ch1, ch2, ch3,
// ch0, ... with one grant per two cycles (grant, then release).
// Part 2: random requesters that wait while not granted and hold rq for a
// random time once granted; each cycle the grant is compared with a
// reference model of the rotating rule kept in the testbench.
module tb_dma_rotating_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rq, grant;
  int checks = 0, failures = 0;

  dma_rotating_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t grant=%b rq=%b", what, $time, grant, rq); end
  endtask

  // reference model
  logic [N-1:0] m_grant;
  int m_ptr;
  function automatic void model_step(logic [N-1:0] r);
    if (m_grant != 0) begin
      if ((m_grant & r) == 0) m_grant = 0;
    end else begin
      for (int k = 0; k < N; k++) begin
        int c;
        c = (m_ptr + k) % N;
        if (r[c]) begin
          m_grant = N'(1) << c;
          m_ptr = (c + 1) % N;
          break;
        end
      end
    end
  endfunction

  int hold [N];
  int order [$];
  int last_grant_cycle, cyc;

  initial begin
    rq = '0; m_grant = '0; m_ptr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // part 1: everybody requests, holder drops rq when it sees its grant
    rq = '1;
    cyc = 0; last_grant_cycle = -1;
    while (order.size() < 9) begin
      @(posedge clk); #1; cyc++;
      if (grant != 0 && (grant & rq) != 0) begin
        for (int c = 0; c < N; c++) if (grant[c]) begin
          order.push_back(c);
          if (last_grant_cycle >= 0) check(cyc - last_grant_cycle == 2, "grant period 2 cycles");
          last_grant_cycle = cyc;
        end
        rq = rq & ~grant;          // release for one cycle
      end else begin
        rq = '1;
      end
    end
    for (int k = 0; k < 9; k++) check(order[k] == k % N, "rotation order ch0..ch3");
    // part 2: random traffic against the model
    @(negedge clk);
    rst_n = 0; rq = '0;
    @(posedge clk); #1;
    rst_n = 1; m_grant = '0; m_ptr = 0;
    foreach (hold[i]) hold[i] = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        if (grant[c]) begin
          if (hold[c] == 0) rq[c] = 1'b0; else hold[c]--;
        end else if (!rq[c]) begin
          if ($urandom % 3 == 0) begin rq[c] = 1'b1; hold[c] = $urandom % 6; end
        end
      end
      @(posedge clk);
      model_step(rq);
      #1;
      check(grant == m_grant, "grant matches rotating model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
