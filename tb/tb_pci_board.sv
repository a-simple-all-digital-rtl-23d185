`timescale 1ps/1ps
// tb_pci_board: one full 2 MB DMA buffer through the PCI interface board.
// The sampling-unit side writes 524288 32-bit words (2 MB) at the 75 MHz main
// clock whenever the 32K-word FIFO is not full; the bridge model empties it at
// the 40 MHz local clock in 16-word bursts. Word i carries a value computed
// from i on both sides, so loss, duplication and reordering are all caught.
// Checks: all words arrive in order; the FIFO fills (back-pressure is
// exercised) and holds exactly 32768 words; and the local-bus transfer rate
// is at least the 43 MB/s measured on the prototype board.
module tb_pci_board;
  localparam int N_WORDS = 2 * 1024 * 1024 / 4;
  localparam int AW = 15;
  logic wclk = 0, lclk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic wr_en = 0, full;
  logic [31:0] wdata = '0;
  logic lhold, lholda, ads_n, blast_n, lw_r_n, ready_n, ld_oe, dreq_n;
  logic [31:0] ld, word;
  logic [AW:0] fifo_level;
  logic word_valid, wr_acked, enable = 0;
  int checks = 0, failures = 0;

  pci_board #(.FIFO_AW(AW)) dut (.wclk, .rst_n, .wr_en, .wdata, .full, .lclk, .lhold, .lholda,
    .ads_n, .blast_n, .lw_r_n, .ready_n, .ld, .ld_oe, .dreq_n, .fifo_level);
  pci9054_local_model #(.BURST(16)) bridge (.lclk, .rst_n, .enable, .wr_req(1'b0), .lhold, .lholda,
    .ads_n, .blast_n, .lw_r_n, .ready_n, .ld, .dreq_n, .word_valid, .word, .wr_acked);

  always #6667 wclk = ~wclk;    // 75 MHz
  always #12500 lclk = ~lclk;   // 40 MHz

  function automatic logic [31:0] pattern(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'(i >> 3);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int n_wr = 0, n_full = 0;
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) n_wr <= n_wr + 1;
    if (full) n_full <= n_full + 1;
  end
  always @(negedge wclk) begin
    wr_en <= rst_n && (n_wr + int'(wr_en && !full) < N_WORDS);
    wdata <= pattern(n_wr);
  end

  // reader
  int n_rd = 0, n_bad = 0, max_level = 0, lcyc = 0, t_first = -1;
  always @(posedge lclk) begin
    lcyc <= lcyc + 1;
    if (int'(fifo_level) > max_level) max_level <= int'(fifo_level);
    if (word_valid) begin
      if (t_first < 0) t_first <= lcyc;
      if (word != pattern(n_rd)) n_bad <= n_bad + 1;
      n_rd <= n_rd + 1;
    end
  end

  initial begin
    int t0;
    real rate;
    repeat (3) @(posedge lclk);
    rst_n = 1;
    // let the FIFO fill up before DMA starts, as when the host is late
    wait (full);
    repeat (100) @(posedge lclk);
    enable = 1;
    t0 = lcyc;
    wait (n_rd == N_WORDS);
    rate = 4.0 * N_WORDS / (real'(lcyc - t0) * 25e-9) / 1e6;
    $display("2 MB moved in %0d local clocks: %0.1f MB/s", lcyc - t0, rate);
    check(n_bad == 0, $sformatf("%0d corrupted words", n_bad));
    check(n_wr == N_WORDS, "writer count");
    check(n_full > 0, "FIFO never full");
    check(max_level == (1 << AW), $sformatf("max level %0d, expected %0d", max_level, 1 << AW));
    check(rate >= 43.0, "rate below 43 MB/s");
    repeat (20) @(posedge lclk);
    check(fifo_level == 0 && dreq_n, "FIFO not drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
