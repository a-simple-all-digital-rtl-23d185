`timescale 1ps/1ps
// tb_pet_daq_top: end-to-end test of the front end, from detector pulses to
// the words the PCI bridge reads by DMA. Two sampling units as by default; the
// board FIFO is reduced to 256 words so that it can be filled in a short run
// (tb_pet_daq_full runs the default size). The bridge reads 8-word bursts, two
// records, so a burst can outrun the FIFO and wait states occur.
//
// Each unit gets its own pulse source. Every 4-word record read over the local
// bus is routed by its unit id and compared with that source's reference:
// energy, peak and sample count, the sample count against the time over
// threshold at 1.5 GS/s, and both time stamps against the exact crossing
// times (within one LSB). Phases:
//   0  a pulse is present on unit 1 when reset is released: it must be skipped
//      whole (the TDC discards its stop edge, the ADC capture its samples);
//   1  random pulses on both units with DMA running, after a time_clr;
//   2  DMA held off while short pulses arrive until the board FIFO is full;
//   3  still held off, three very long (over-range) pulses on unit 0 overflow its ADC FIFO
//      (their sample-derived fields are then not compared);
//   4  DMA resumes, everything drains; the DMA rate must reach 43 MB/s.
// Mechanism counters (each must be non-zero): orphan stop, time clear, merge
// contention, board FIFO full, ADC FIFO overflow, local-bus wait state, DMA
// burst.
module tb_pet_daq_top;
  import pet_pkg::*;
  import pulse_ref_pkg::*;
  localparam int HALF = 6667, T = 2 * HALF;
  localparam int NSU = 2;
  localparam int BAW = 8;   // board FIFO of 256 words so that it fills quickly
  logic sample_clk = 0, main_clk = 0, lclk = 0, rst_n = 1, time_clr = 0;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [NSU-1:0][SAMPLE_W-1:0] adc_data;
  logic [NSU-1:0] above_ref;
  logic lhold, lholda, ads_n, blast_n, lw_r_n, ready_n, ld_oe, dreq_n;
  logic [WORD_W-1:0] ld, word;
  logic [NSU-1:0] adc_overflow, tdc_overflow, tag_error;
  logic [BAW:0] board_fifo_level;
  logic word_valid, wr_acked, enable = 0;
  int checks = 0, failures = 0;

  pet_daq_top #(.BOARD_FIFO_AW(BAW)) dut (.*);

  pulse_source src0 (.sample_clk, .adc_data(adc_data[0]), .above_ref(above_ref[0]));
  pulse_source src1 (.sample_clk, .adc_data(adc_data[1]), .above_ref(above_ref[1]));

  pci9054_local_model #(.BURST(8)) bridge (.lclk, .rst_n, .enable, .wr_req(1'b0), .lhold, .lholda,
    .ads_n, .blast_n, .lw_r_n, .ready_n, .ld, .dreq_n, .word_valid, .word, .wr_acked);

  always #333 sample_clk = ~sample_clk;   // 1.5 GHz
  always #HALF main_clk = ~main_clk;      // 75 MHz
  always #12500 lclk = ~lclk;             // 40 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #20_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time base: count n labels the main-clock edge base + n*T
  longint base = longint'(HALF) - T;
  function automatic longint edge_time(input logic [31:0] n);
    return base + longint'(n) * T;
  endfunction

  // ---------------- mechanism counters ----------------
  int m_orphan = 0, m_clr = 0, m_contend = 0, m_full = 0, m_adc_ovf = 0, m_wait = 0, m_burst = 0;
  always @(posedge main_clk) begin
    if (dut.g_su[0].u_su.u_tdc.clr_stop && !dut.g_su[0].u_su.u_tdc.clr_start) m_orphan++;
    if (dut.g_su[1].u_su.u_tdc.clr_stop && !dut.g_su[1].u_su.u_tdc.clr_start) m_orphan++;
    if (time_clr) m_clr++;
    if (&dut.su_valid) m_contend++;
    if (dut.board_full) m_full++;
    if (|tdc_overflow || |tag_error) check(0, "TDC FIFO overflow or tag error");
  end
  always @(posedge sample_clk) if (|adc_overflow) m_adc_ovf++;
  always @(posedge lclk) begin
    if (ld_oe && ready_n) m_wait++;
    if (!ads_n && lholda) m_burst++;
  end

  // ---------------- record checker ----------------
  logic [WORD_W-1:0] rec[4];
  int widx = 0, n_events = 0, n_words = 0;
  int n_ev_su[NSU] = '{0, 0};
  int skip_samples_from[NSU] = '{1 << 30, 1 << 30};   // event index from which sample fields go unchecked
  int skip_samples_to[NSU]   = '{-1, -1};

  always @(posedge lclk) if (word_valid) begin
    rec[widx] = word;
    widx = (widx + 1) % 4;
    n_words++;
    if (widx == 0) check_event();
  end

  task automatic check_event();
    int id, k;
    longint ts, tp;
    pulse_ref_t r;
    bit samples_ok;
    id = int'(rec[0][31:27]);
    if (id >= NSU) begin check(0, $sformatf("bad unit id %0d", id)); return; end
    k = n_ev_su[id]++;
    n_events++;
    if (id == 0) begin
      if (src0.done_q.size() == 0) begin check(0, "unit 0 record without a pulse"); return; end
      r = src0.done_q.pop_front();
    end else begin
      if (src1.done_q.size() == 0) begin check(0, "unit 1 record without a pulse"); return; end
      r = src1.done_q.pop_front();
    end
    samples_ok = !(k >= skip_samples_from[id] && k <= skip_samples_to[id]);
    if (samples_ok) begin
      check(int'(rec[0][18:0]) == r.energy, $sformatf("unit %0d event %0d energy %0d expected %0d", id, k, rec[0][18:0], r.energy));
      check(int'(rec[0][26:19]) == r.peak, $sformatf("unit %0d event %0d peak %0d expected %0d", id, k, rec[0][26:19], r.peak));
      check(int'(rec[2][15:0]) == r.nsamp, $sformatf("unit %0d event %0d samples %0d expected %0d", id, k, rec[2][15:0], r.nsamp));
      // 1.5 GS/s: sample count against time over threshold
      check(int'(rec[2][15:0]) - int'((r.t_fall - r.t_rise) / 666) <= 2 &&
            int'((r.t_fall - r.t_rise) / 666) - int'(rec[2][15:0]) <= 2, "sample rate");
    end
    ts = edge_time(rec[1]) - longint'(rec[2][22:16]) * 196;
    tp = edge_time(rec[3]) - longint'(rec[2][29:23]) * 256;
    check(ts >= r.t_rise && ts - r.t_rise < 196, $sformatf("unit %0d event %0d start %0d ps, true %0d ps", id, k, ts, r.t_rise));
    check(tp >= r.t_fall && tp - r.t_fall < 256, $sformatf("unit %0d event %0d stop %0d ps, true %0d ps", id, k, tp, r.t_fall));
  endtask

  // ---------------- stimulus ----------------
  int fired[NSU] = '{0, 0};
  bit stop_firing = 0;

  task automatic fire_random(input int id, input int n, input bit short_pulses);
    for (int k = 0; k < n && !stop_firing; k++) begin
      real amp;
      amp = short_pulses ? 10.5 + real'($urandom % 10) / 10.0 : 12.0 + real'($urandom % 2200) / 10.0;
      // wait until the unit's TDC is armed and its DSPU0 has taken the previous pulse
      if (id == 0) begin
        while ((!dut.g_su[0].u_su.u_tdc.armed || !dut.g_su[0].u_su.adc_empty) && !stop_firing)
          @(posedge main_clk);
        if (stop_firing) break;
        #(200 + $urandom % 15000);
        fork src0.fire(amp); join_none
      end else begin
        while ((!dut.g_su[1].u_su.u_tdc.armed || !dut.g_su[1].u_su.adc_empty) && !stop_firing)
          @(posedge main_clk);
        if (stop_firing) break;
        #(200 + $urandom % 15000);
        fork src1.fire(amp); join_none
      end
      fired[id]++;
      #1000;
      while (above_ref[id]) #1000;
      repeat (12) @(posedge main_clk);
    end
  endtask

  initial begin
    int t0, lcyc0;
    // phase 0: unit 1 has a pulse in progress at reset release
    #50_000;
    fork src1.fire(300.0); join_none
    #20_000;
    @(negedge main_clk) rst_n = 1;
    wait (!above_ref[1]);
    repeat (40) @(posedge main_clk);
    check(src1.done_q.size() == 1, "reference for the pre-reset pulse");
    void'(src1.done_q.pop_front());
    check(m_orphan > 0, "orphan stop edge not discarded");

    // phase 1: restart the system time, then random pulses with DMA running
    @(negedge main_clk) time_clr = 1;
    @(posedge main_clk) base = longint'($time);
    @(negedge main_clk) time_clr = 0;
    enable = 1;
    fork
      fire_random(0, 25, 0);
      fire_random(1, 25, 0);
    join
    wait (n_events == fired[0] + fired[1]);
    $display("phase 1: %0d events checked", n_events);

    // phase 2: DMA held off, short pulses until the board FIFO is full
    @(negedge lclk) enable = 0;
    fork
      fire_random(0, 100000, 1);
      fire_random(1, 100000, 1);
      begin wait (dut.board_full); stop_firing = 1; end
    join
    repeat (200) @(posedge main_clk);
    check(board_fifo_level == (BAW+1)'(1 << BAW), $sformatf("board FIFO level %0d when full", board_fifo_level));
    $display("phase 2: board FIFO full after %0d + %0d pulses", fired[0], fired[1]);

    // phase 3: very long pulses overflow unit 0's ADC FIFO
    stop_firing = 0;
    skip_samples_from[0] = fired[0];
    for (int k = 0; k < 3; k++) begin
      while (!dut.g_su[0].u_su.u_tdc.armed) @(posedge main_clk);
      #(300);
      src0.fire(5000.0);
      fired[0]++;
      repeat (12) @(posedge main_clk);
    end
    skip_samples_to[0] = fired[0] - 1;
    repeat (100) @(posedge main_clk);
    check(m_adc_ovf > 0, "no ADC FIFO overflow");

    // phase 4: DMA resumes and drains everything
    lcyc0 = n_words;
    t0 = int'($time / 1000);
    @(negedge lclk) enable = 1;
    wait (n_events == fired[0] + fired[1]);
    $display("phase 4: drained %0d words at %0.1f MB/s", n_words - lcyc0,
             4.0 * real'(n_words - lcyc0) / (real'(int'($time / 1000) - t0) * 1e-9) / 1e6);
    check(4.0 * real'(n_words - lcyc0) / (real'(int'($time / 1000) - t0) * 1e-9) / 1e6 >= 43.0, "DMA rate below 43 MB/s");
    repeat (50) @(posedge lclk);
    check(src0.done_q.size() == 0 && src1.done_q.size() == 0, "pulses without records");
    check(n_ev_su[0] == fired[0] && n_ev_su[1] == fired[1], "event counts per unit");

    $display("mechanisms: orphan_stop=%0d time_clr=%0d merge_contention=%0d board_full=%0d adc_overflow=%0d wait_state=%0d dma_burst=%0d",
             m_orphan, m_clr, m_contend, m_full, m_adc_ovf, m_wait, m_burst);
    check(m_orphan > 0, "mechanism orphan stop never happened");
    check(m_clr > 0, "mechanism time clear never happened");
    check(m_contend > 0, "mechanism merge contention never happened");
    check(m_full > 0, "mechanism board FIFO full never happened");
    check(m_adc_ovf > 0, "mechanism ADC overflow never happened");
    check(m_wait > 0, "mechanism local-bus wait state never happened");
    check(m_burst > 0, "mechanism DMA burst never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
