`timescale 1ps/1ps
// tb_tdc: end-to-end test of the Nutt TDC at 75 MHz.
// For random start/stop instants it collects the four output words and checks
// each against values worked out from the edge times: the coarse words against
// the clock count after each edge, the fine words against
// floor(distance to the next clock edge / LSB), and the reconstructed interval
// (Pc - Sc)*T + Sf*196 - Pf*256 against the true interval to within one LSB of
// each line. It also checks the tag order, that the four words come on four
// consecutive clocks, the dead time until 'armed', and that a stop edge with
// no start edge is ignored.
module tb_tdc;
  import pet_pkg::*;
  localparam int HALF = 6667, T = 2 * HALF;
  localparam int LSB_S = 196, LSB_P = 256;
  logic clk = 0, rst_n = 1, start = 0, stop = 0;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [COARSE_W-1:0] count = '0;
  logic out_valid, armed;
  tdc_word_t out_word;
  int checks = 0, failures = 0;

  tdc dut (.*);

  always #HALF clk = ~clk;
  always @(posedge clk) count <= count + 1;

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

  // output collector
  tdc_word_t words[$];
  int        word_cycle[$];
  int        cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin words.push_back(out_word); word_cycle.push_back(cyc); end
  end

  function automatic int safe_offset(input int lsb1, input int lsb2);
    int off;
    do off = 100 + ($urandom % (T - 200));
    while (((T - off) % lsb1) < 4 || ((T - off) % lsb1) > lsb1 - 4 ||
           ((T - off) % lsb2) < 4 || ((T - off) % lsb2) > lsb2 - 4);
    return off;
  endfunction

  initial begin
    time t_s, t_p, e_s, e_p;
    int  c_s, c_p, exp_sf, exp_pf, gap_cycles, dead;
    longint meas, truth;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // an orphan stop edge must produce nothing
    #(3000) stop = 1;
    repeat (6) @(posedge clk);
    check(words.size() == 0, "orphan stop produced output");
    stop = 0;
    repeat (3) @(posedge clk);

    for (int k = 0; k < 200; k++) begin
      wait (armed);
      @(posedge clk);
      #(safe_offset(LSB_S, LSB_P));
      t_s = $time; start = 1;
      @(posedge clk); e_s = $time; #1 c_s = int'(count);
      gap_cycles = $urandom % 12;                 // 0: stop in the same period
      repeat (gap_cycles) @(posedge clk);
      if (gap_cycles > 0) #(safe_offset(LSB_P, LSB_P));
      else #(1 + ((e_s + T - $time - 300) > 0 ? $urandom % (e_s + T - $time - 300) : 0));
      t_p = $time; stop = 1;
      @(posedge clk); e_p = $time; #1 c_p = int'(count);
      if (((e_p - t_p) % LSB_P) < 3 || ((e_p - t_p) % LSB_P) > LSB_P - 3) begin
        // too close to a cell boundary to predict; still run it, skip exact fine check
        exp_pf = -1;
      end else exp_pf = int'((e_p - t_p) / LSB_P);
      exp_sf = int'((e_s - t_s) / LSB_S);
      dead = 0;
      while (words.size() < 4) begin @(posedge clk); dead++; end
      start = 0; stop = 0;
      check(words[0].tag == TAG_START_FINE && words[1].tag == TAG_START_COARSE &&
            words[2].tag == TAG_STOP_FINE && words[3].tag == TAG_STOP_COARSE, "tag order");
      check(word_cycle[3] - word_cycle[0] == 3, "words not on consecutive clocks");
      check(int'(words[0].data) == exp_sf, $sformatf("start fine %0d expected %0d", words[0].data, exp_sf));
      check(int'(words[1].data) == c_s, $sformatf("start coarse %0d expected %0d", words[1].data, c_s));
      if (exp_pf >= 0) check(int'(words[2].data) == exp_pf, $sformatf("stop fine %0d expected %0d", words[2].data, exp_pf));
      check(int'(words[3].data) == c_p, $sformatf("stop coarse %0d expected %0d", words[3].data, c_p));
      meas  = longint'(words[3].data - words[1].data) * T + longint'(words[0].data) * LSB_S
            - longint'(words[2].data) * LSB_P;
      truth = longint'(t_p - t_s);
      check(meas - truth < LSB_P && truth - meas < LSB_S,
            $sformatf("interval measured %0d ps, true %0d ps", meas, truth));
      words.delete(); word_cycle.delete();
      // dead time: armed again 1 + CLEAR_CYCLES clocks after the last word
      dead = 0;
      while (!armed) begin @(posedge clk); #1; dead++; end
      check(dead <= 5, $sformatf("dead time %0d clocks after the last word", dead));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
