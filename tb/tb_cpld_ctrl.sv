`timescale 1ps/1ps
// tb_cpld_ctrl: checks the CPLD controller against the bridge's local-bus DMA.
// The board FIFO is modelled by a queue (first-word-fall-through) and the
// bridge by pci9054_local_model doing 16-word read bursts. Checks: every word
// reaches the bridge once and in order; READY# is never low in a read while
// the FIFO is empty; LHOLDA follows LHOLD by one clock; DREQ# tracks the FIFO;
// a bridge write is acknowledged; with a full FIFO a 16-word burst takes 16
// data clocks, and the sustained rate at 40 MHz is at least the 43 MB/s the
// board was measured at (0.27 words per clock).
module tb_cpld_ctrl;
  logic lclk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic lhold, lholda, ads_n, blast_n, lw_r_n, ready_n, ld_oe, dreq_n;
  logic [31:0] ld, fifo_rdata, word;
  logic fifo_empty, fifo_rd, word_valid, wr_acked;
  logic enable = 0, wr_req = 0;
  int checks = 0, failures = 0;

  logic [31:0] fq[$], sent[$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_rdata = fifo_empty ? 32'hDEAD_BEEF : fq[0];

  cpld_ctrl dut (.*);
  pci9054_local_model #(.BURST(16)) bridge (.lclk, .rst_n, .enable, .wr_req, .lhold, .lholda, .ads_n,
    .blast_n, .lw_r_n, .ready_n, .ld, .dreq_n, .word_valid, .word, .wr_acked);

  always #12500 lclk = ~lclk;   // 40 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_recv = 0, n_wr_ack = 0, n_wait = 0, cyc = 0;
  logic prev_lhold = 0, prev_empty = 1;
  always @(posedge lclk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!ready_n && ld_oe && fifo_empty) check(0, "READY# low on a read while FIFO empty");
      if (ld_oe && ready_n) n_wait++;
      check(lholda == prev_lhold, "LHOLDA does not follow LHOLD");
      check(dreq_n == prev_empty, "DREQ# does not follow the FIFO");
    end
    prev_lhold <= lhold;
    prev_empty <= fifo_empty;
    pop_q <= fifo_rd && !fifo_empty;
    if (word_valid) begin
      if (sent.size() == 0) check(0, "word from nowhere");
      else check(word == sent.pop_front(), "word order/data");
      n_recv++;
    end
    if (wr_acked) n_wr_ack++;
  end

  // the queue is popped half a clock after the edge that consumed its head
  logic pop_q = 0;
  always @(negedge lclk) if (pop_q) void'(fq.pop_front());

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] w;
      w = $urandom;
      fq.push_back(w);
      sent.push_back(w);
    end
  endtask

  initial begin
    int t0, t1, burst_start, burst_cycles, n_trickle;
    repeat (3) @(posedge lclk);
    rst_n = 1;
    // 1: full FIFO, measure burst timing and rate
    @(negedge lclk);
    push(16 * 64);
    enable = 1;
    t0 = cyc;
    wait (sent.size() == 0);
    t1 = cyc;
    check(n_recv == 1024, "not all words received");
    check(real'(1024) / real'(t1 - t0) >= 0.27,
          $sformatf("rate %0.3f words/clock below 43 MB/s", real'(1024) / real'(t1 - t0)));
    $display("full-FIFO rate: %0.3f words per local clock = %0.1f MB/s at 40 MHz",
             real'(1024) / real'(t1 - t0), 160.0 * 1024 / real'(t1 - t0));
    // one burst timed alone: address phase to last ready
    @(negedge lclk) push(16);
    @(negedge ads_n); burst_start = cyc;
    wait (sent.size() == 0); burst_cycles = cyc - burst_start;
    check(burst_cycles <= 16 + 2, $sformatf("16-word burst took %0d clocks", burst_cycles));
    // 2: trickle, FIFO runs dry inside bursts -> wait states
    n_wait = 0;
    n_trickle = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge lclk);
      if ($urandom % 3 == 0) begin push(1); n_trickle++; end
    end
    // complete the last burst: the total pushed must be a whole number of bursts
    while (n_trickle % 16 != 0) begin @(negedge lclk); push(1); n_trickle++; end
    wait (sent.size() == 0);
    check(n_wait > 0, "no wait states seen while the FIFO ran dry");
    // 3: a write from the bridge is acknowledged and does not consume data
    @(negedge lclk) wr_req = 1;
    @(negedge lclk) wr_req = 0;
    repeat (10) @(negedge lclk);
    check(n_wr_ack == 1, "write not acknowledged");
    check(fq.size() == 0 && sent.size() == 0, "queue state after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
