`timescale 1ps/1ps
// tb_pet_daq_full: one complete operation of the front end at its default
// size (two sampling units, 32K-word board FIFO, no parameter overrides).
// A pulse present at reset release must be skipped; after a time_clr, random
// pulses on both units are processed with DMA running, and every record read
// over the local bus is checked against the pulse sources' references
// (energy, peak, sample count, sample rate, start and stop times). The bridge
// reads 8-word bursts, so bursts outrun the FIFO and wait states occur.
module tb_pet_daq_full;
  import pet_pkg::*;
  import pulse_ref_pkg::*;
  localparam int HALF = 6667, T = 2 * HALF;
  localparam int NSU = 2;
  logic sample_clk = 0, main_clk = 0, lclk = 0, rst_n = 1, time_clr = 0;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [NSU-1:0][SAMPLE_W-1:0] adc_data;
  logic [NSU-1:0] above_ref;
  logic lhold, lholda, ads_n, blast_n, lw_r_n, ready_n, ld_oe, dreq_n;
  logic [WORD_W-1:0] ld, word;
  logic [NSU-1:0] adc_overflow, tdc_overflow, tag_error;
  logic [15:0] board_fifo_level;
  logic word_valid, wr_acked, enable = 0;
  int checks = 0, failures = 0;

  pet_daq_top dut (.*);

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

    // one more round of short pulses
    lcyc0 = n_words;
    t0 = int'($time / 1000);
    fork
      fire_random(0, 10, 1);
      fire_random(1, 10, 1);
    join
    wait (n_events == fired[0] + fired[1]);
    $display("drain: drained %0d words at %0.1f MB/s", n_words - lcyc0,
             4.0 * real'(n_words - lcyc0) / (real'(int'($time / 1000) - t0) * 1e-9) / 1e6);
    repeat (50) @(posedge lclk);
    check(src0.done_q.size() == 0 && src1.done_q.size() == 0, "pulses without records");
    check(n_ev_su[0] == fired[0] && n_ev_su[1] == fired[1], "event counts per unit");

    $display("mechanisms: orphan_stop=%0d time_clr=%0d merge_contention=%0d board_full=%0d adc_overflow=%0d wait_state=%0d dma_burst=%0d",
             m_orphan, m_clr, m_contend, m_full, m_adc_ovf, m_wait, m_burst);
    check(m_orphan > 0, "mechanism orphan stop never happened");
    check(m_clr > 0, "mechanism time clear never happened");
    check(m_contend > 0, "mechanism merge contention never happened");
    check(m_wait > 0, "mechanism local-bus wait state never happened");
    check(m_burst > 0, "mechanism DMA burst never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
