`timescale 1ps/1ps
// tb_sampling_unit: one sampling unit driven by exponential detector pulses.
// pulse_source supplies the ADC codes, the comparator output and the reference
// results. Each event record must carry the unit id, the reference energy,
// peak and sample count, and start/stop time stamps that rebuild the true
// threshold-crossing times: edge(coarse) - fine * LSB lies at most one LSB
// after the truth (196 ps start line, 256 ps stop line). The output is throttled at
// random. No overflow or tag error may occur at this pulse rate.
module tb_sampling_unit;
  import pet_pkg::*;
  localparam int HALF = 6667, T = 2 * HALF;
  localparam logic [SU_ID_W-1:0] ID = 5'd3;
  logic sample_clk = 0, main_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [COARSE_W-1:0] count = '0;
  logic [SAMPLE_W-1:0] adc_data;
  logic above_ref;
  logic [WORD_W-1:0] ev_data;
  logic ev_valid, ev_last, ev_ready = 0, adc_overflow, tdc_overflow, tag_error;
  int checks = 0, failures = 0;

  sampling_unit #(.SU_ID(ID)) dut (.*);
  pulse_source src (.sample_clk, .adc_data, .above_ref);

  always #333 sample_clk = ~sample_clk;   // 1.5 GHz
  always #HALF main_clk = ~main_clk;      // 75 MHz
  always @(posedge main_clk) count <= count + 1;   // count n labels edge HALF + (n-1)*T

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint edge_time(input logic [31:0] n);
    return longint'(HALF) + (longint'(n) - 1) * T;
  endfunction

  logic [WORD_W-1:0] rec[4];
  int widx = 0, n_events = 0, n_ovf = 0;
  always @(negedge main_clk) ev_ready <= ($urandom % 3) != 0;
  always @(posedge main_clk) begin
    if (adc_overflow || tdc_overflow) n_ovf++;
    if (ev_valid && ev_ready) begin
      rec[widx] = ev_data;
      check(ev_last == (widx == 3), "last flag");
      widx = (widx + 1) % 4;
      if (widx == 0) check_event();
    end
  end

  task automatic check_event();
    longint ts, tp;
    if (src.done_q.size() == 0) begin check(0, "record without a pulse"); return; end
    begin
      automatic pulse_ref_pkg::pulse_ref_t r = src.done_q.pop_front();
      check(rec[0][31:27] == ID, "unit id");
      check(int'(rec[0][18:0]) == r.energy, $sformatf("energy %0d expected %0d", rec[0][18:0], r.energy));
      check(int'(rec[0][26:19]) == r.peak, $sformatf("peak %0d expected %0d", rec[0][26:19], r.peak));
      check(int'(rec[2][15:0]) == r.nsamp, $sformatf("samples %0d expected %0d", rec[2][15:0], r.nsamp));
      ts = edge_time(rec[1]) - longint'(rec[2][22:16]) * 196;
      tp = edge_time(rec[3]) - longint'(rec[2][29:23]) * 256;
      check(ts >= r.t_rise && ts - r.t_rise < 196, $sformatf("start %0d ps, true %0d ps", ts, r.t_rise));
      check(tp >= r.t_fall && tp - r.t_fall < 256, $sformatf("stop %0d ps, true %0d ps", tp, r.t_fall));
    end
    n_events++;
  endtask

  initial begin
    repeat (3) @(posedge main_clk);
    rst_n = 1;
    repeat (5) @(posedge main_clk);
    for (int k = 0; k < 40; k++) begin
      #(1000 + $urandom % 20000);
      src.fire(12.0 + real'($urandom % 3000) / 10.0);
      // next pulse once this one is processed and the TDC is re-armed
      while (n_events < k + 1) @(posedge main_clk);
    end
    repeat (20) @(posedge main_clk);
    check(n_events == 40, $sformatf("%0d events", n_events));
    check(n_ovf == 0 && !tag_error, "overflow or tag error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
