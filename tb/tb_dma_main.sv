// tb_dma_main: end-to-end test of the four-channel DMA controller at its
// default sizes (16/64/64/128-bit channels, 16-word FIFOs, 16-entry
// descriptor buffer, 16-word bursts).
//
// The testbench acts as the CPU (mode, wr, din) and as the devices: each
// channel's source returns, in the same cycle as rdI, a word computed from the
// channel number and add; each write cycle (wrI) is compared with the word the
// source produced for the matching source address. From every task table it
// builds the expected sequence of bus cycles - descriptor k goes to the
// channel next in the rotating order, 16 read cycles on source+i, then 16
// write cycles on destination+i carrying the source data - and checks each
// clock against it, plus add = 0 and dout = 0 on idle cycles.
//
// Scenarios:
//   A  after reset, one descriptor: only channel 0 moves (single-channel run)
//   B  after reset, four descriptors: channels 0, 1, 2, 3 in turn
//   C  six descriptors without reset: the rotation wraps from ch3 to ch0
//   D  twenty descriptors written: only the first 16 are kept and executed
// Busy must rise with mode and stay high for exactly 35 cycles per descriptor
// (2 to grant and copy, 16 read, 16 write, 1 hand-over). Mechanism counters
// (table writes, mode switches, grants per channel, wrap, full FIFOs,
// dropped descriptor writes, busy falling at descriptor count 0) must all be
// non-zero at the end.
module tb_dma_main;
  localparam int BL = 16;
  localparam int CYC_PER_DESC = 2 * BL + 3;

  logic clock = 1'b0, rst_n = 1'b0;
  logic mode, wr;
  logic [15:0] din, add;
  logic [15:0]  din0, dout0;
  logic [63:0]  din1, dout1;
  logic [63:0]  din2, dout2;
  logic [127:0] din3, dout3;
  logic busy, rd0, rd1, rd2, rd3, wr0, wr1, wr2, wr3;

  int checks = 0, failures = 0;

  dma_main dut (.*);

  always #5 clock = ~clock;

  // ---------------------------------------------------------------- devices
  function automatic logic [127:0] src_word(int ch, logic [15:0] a);
    logic [31:0] h;
    h = {a, a} ^ (32'h9E37_79B9 * (ch + 1));
    return {h ^ 32'h0F0F_0F0F, ~h, h + 32'd77, h * 32'd3 + 32'(ch)};
  endfunction

  logic [3:0] rd_v, wr_v;
  assign rd_v = {rd3, rd2, rd1, rd0};
  assign wr_v = {wr3, wr2, wr1, wr0};

  // data outside a read cycle is garbage, so only read cycles may load a FIFO
  assign din0 = rd0 ? src_word(0, add)[15:0] : 16'hBAD0;
  assign din1 = rd1 ? src_word(1, add)[63:0] : 64'hBAD1;
  assign din2 = rd2 ? src_word(2, add)[63:0] : 64'hBAD2;
  assign din3 = rd3 ? src_word(3, add)       : 128'hBAD3;

  function automatic logic [127:0] dout_of(int ch);
    case (ch)
      0: return {112'h0, dout0};
      1: return {64'h0, dout1};
      2: return {64'h0, dout2};
      default: return dout3;
    endcase
  endfunction

  function automatic logic [127:0] mask_of(int ch);
    case (ch)
      0: return {112'h0, {16{1'b1}}};
      1, 2: return {64'h0, {64{1'b1}}};
      default: return {128{1'b1}};
    endcase
  endfunction

  // ------------------------------------------------------- expected cycles
  typedef struct {
    bit          is_wr;
    int          ch;
    logic [15:0] addr;
    logic [127:0] data;
  } bus_ev_t;

  bus_ev_t exp_q[$];
  int grants_seq = 0;          // descriptors handed out since the last reset

  // mechanism counters
  int n_table_writes = 0, n_mode_switch = 0, n_wrap = 0, n_fifo_full = 0;
  int n_dropped = 0, n_done = 0, n_idle_cycles = 0, n_overflow_seen = 0;
  int n_grant [4] = '{default: 0};
  int last_ch = -1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // compare every clock with the expected bus cycle
  always @(posedge clock) begin
    if (rst_n) begin
      if ((rd_v | wr_v) != 0) begin
        bus_ev_t e;
        int ch;
        ch = -1;
        for (int c = 0; c < 4; c++) if (rd_v[c] || wr_v[c]) ch = c;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL unexpected bus cycle ch%0d at %0t", ch, $time);
        end else begin
          e = exp_q.pop_front();
          if ($countones(rd_v | wr_v) != 1 || ch != e.ch || wr_v[ch] != e.is_wr || rd_v[ch] == e.is_wr
              || add != e.addr || (e.is_wr && (dout_of(ch) != (e.data & mask_of(ch))))) begin
            failures++;
            $display("FAIL bus cycle at %0t: ch%0d rd=%b wr=%b add=%h; expected ch%0d %s add=%h",
                     $time, ch, rd_v, wr_v, add, e.ch, e.is_wr ? "wr" : "rd", e.addr);
          end
          if (!e.is_wr && e.addr == 16'hFFFF) ; // address wrap is legal
        end
        if (rd_v[ch] && last_ch != ch) begin
          n_grant[ch]++;
          if (last_ch == 3 && ch == 0) n_wrap++;
          last_ch = ch;
        end
      end else begin
        n_idle_cycles++;
        checks++;
        if (add != 0 || dout0 != 0 || dout1 != 0 || dout2 != 0 || dout3 != 0) begin
          failures++; $display("FAIL idle bus not quiet at %0t", $time);
        end
      end
    end
  end

  // A full FIFO shows on the pins as BL consecutive read cycles of one
  // channel; executed descriptors are counted by their first read cycle.
  int rd_run = 0, n_started = 0;
  logic [3:0] rd_v_q;
  always @(posedge clock) begin
    if (rst_n) begin
      if ((rd_v & ~rd_v_q) != 0) n_started++;
      if (rd_v != 0) rd_run++; else rd_run = 0;
      if (rd_run == BL) n_fifo_full++;
    end
  end
  always @(posedge clock) rd_v_q <= rst_n ? rd_v : 4'h0;

  // ------------------------------------------------------------- CPU side
  task automatic do_reset();
    @(negedge clock);
    rst_n = 0; mode = 0; wr = 0; din = 0;
    repeat (2) @(negedge clock);
    rst_n = 1;
    grants_seq = 0; last_ch = -1;
  endtask

  // write n_write descriptors; only the first 16 are kept
  task automatic run_table(int n_write);
    logic [15:0] s [$], d [$];
    int kept, busy_cycles, started0;
    kept = (n_write > 16) ? 16 : n_write;
    for (int k = 0; k < n_write; k++) begin
      s.push_back(16'($urandom));
      d.push_back(16'($urandom));
    end
    if (n_write > 2) s[2] = 16'hFFF4;        // a burst that wraps its address
    // mode 0: load the table, source then destination per entry
    for (int k = 0; k < n_write; k++) begin
      for (int h = 0; h < 2; h++) begin
        @(negedge clock);
        mode = 0; wr = 1; din = h ? d[k] : s[k];
        #1;
        check(!busy && (rd_v | wr_v) == 0, "quiet in mode 0");
        if (k < 16) n_table_writes++; else n_dropped++;
      end
    end
    // expected bus cycles
    for (int k = 0; k < kept; k++) begin
      int ch;
      ch = (grants_seq + k) % 4;
      for (int i = 0; i < BL; i++) exp_q.push_back('{0, ch, 16'(s[k] + i), '0});
      for (int i = 0; i < BL; i++) exp_q.push_back('{1, ch, 16'(d[k] + i), src_word(ch, 16'(s[k] + i))});
    end
    grants_seq += kept;
    // mode 1: run
    @(negedge clock);
    started0 = n_started;
    wr = 0; mode = 1; n_mode_switch++;
    #1 check(busy, "busy rises with mode 1");
    busy_cycles = 0;
    while (busy) begin
      @(posedge clock); #1;
      busy_cycles++;
      if (busy_cycles > 40 * CYC_PER_DESC) break;
    end
    n_done++;
    check(busy_cycles == kept * CYC_PER_DESC, "busy lasts 35 cycles per descriptor");
    if (busy_cycles != kept * CYC_PER_DESC)
      $display("  busy %0d cycles for %0d descriptors", busy_cycles, kept);
    check(exp_q.size() == 0, "all expected bus cycles seen");
    check(n_started - started0 == kept, "descriptors executed = entries kept");
    if (n_write > 16 && n_started - started0 == 16) n_overflow_seen++;
    exp_q.delete();
    repeat (3) @(negedge clock);
    check(!busy, "busy stays low after the table ends");
    mode = 0;
    @(negedge clock);
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 0; wr = 0; din = 0;
    do_reset();
    run_table(1);                 // A: single channel
    check(n_grant[0] == 1 && n_grant[1] == 0 && n_grant[2] == 0 && n_grant[3] == 0,
          "single descriptor uses channel 0 only");
    do_reset();
    run_table(4);                 // B: all four channels
    run_table(6);                 // C: rotation wraps
    run_table(20);                // D: table overflow
    check(n_table_writes > 0, "mechanism: descriptor table write");
    check(n_mode_switch > 0, "mechanism: mode switch");
    for (int c = 0; c < 4; c++) check(n_grant[c] > 0, "mechanism: channel served");
    check(n_wrap > 0, "mechanism: rotating priority wrap");
    check(n_fifo_full > 0, "mechanism: FIFO filled");
    check(n_dropped == 4 * 2 && n_overflow_seen == 1, "mechanism: entries beyond 16 dropped");
    check(n_done == 4, "mechanism: descriptor count reached 0");
    $display("table writes=%0d dropped words=%0d mode switches=%0d grants=%0d/%0d/%0d/%0d wraps=%0d full=%0d done=%0d",
             n_table_writes, n_dropped, n_mode_switch, n_grant[0], n_grant[1], n_grant[2], n_grant[3],
             n_wrap, n_fifo_full, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
