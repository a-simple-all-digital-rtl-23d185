`timescale 1ps/1ps
// tb_adc_capture: checks the comparator gating of the ADC samples.
// A ramp is fed as ADC data so each sample identifies its clock cycle. For
// pulses of random length the words written must be exactly the samples of
// the cycles in which the synchronised comparator was high (two-cycle lag),
// in order, with last = 1 on the final one only. A full FIFO is then forced
// during a pulse: the held word must wait, new samples must be dropped with
// overflow raised, and the pulse must still end with last = 1. A pulse
// already present when reset is released must produce no words.
module tb_adc_capture;
  import pet_pkg::*;
  logic clk = 0, rst_n = 1, above_ref = 0, fifo_full = 0;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [SAMPLE_W-1:0] adc_data = '0;
  logic wr_en, overflow;
  adc_word_t wr_data;
  int checks = 0, failures = 0;

  adc_capture dut (.*);
  always #333 clk = ~clk;       // about 1.5 GHz
  always @(posedge clk) adc_data <= adc_data + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  adc_word_t got[$];
  int n_overflow = 0;
  always @(posedge clk) begin
    if (wr_en && !fifo_full) got.push_back(wr_data);
    if (overflow) n_overflow++;
  end

  initial begin
    int len;
    logic [SAMPLE_W-1:0] first;
    // a pulse present when reset is released must be ignored entirely
    above_ref = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    above_ref = 0;
    repeat (6) @(negedge clk);
    check(got.size() == 0, $sformatf("%0d words from a pulse present at reset release", got.size()));
    got.delete();
    for (int k = 0; k < 40; k++) begin
      len = 1 + $urandom % 20;
      @(negedge clk);
      above_ref = 1;
      // the first kept sample is the one present two edges after this point
      first = adc_data + 8'd2;
      repeat (len) @(negedge clk);
      above_ref = 0;
      repeat (6) @(negedge clk);
      check(got.size() == len, $sformatf("pulse %0d: %0d words, expected %0d", k, got.size(), len));
      for (int i = 0; i < got.size(); i++) begin
        check(got[i].sample == first + SAMPLE_W'(i), $sformatf("pulse %0d word %0d sample %0d expected %0d",
              k, i, got[i].sample, first + SAMPLE_W'(i)));
        check(got[i].last == (i == got.size() - 1), $sformatf("pulse %0d word %0d last flag", k, i));
      end
      got.delete();
      repeat ($urandom % 5) @(negedge clk);
    end
    // back-pressure: full for 8 cycles in the middle of a 20-sample pulse
    n_overflow = 0;
    @(negedge clk) above_ref = 1;
    repeat (6) @(negedge clk);
    fifo_full = 1;
    repeat (8) @(negedge clk);
    fifo_full = 0;
    repeat (6) @(negedge clk);
    above_ref = 0;
    repeat (6) @(negedge clk);
    check(n_overflow == 8, $sformatf("overflow pulses %0d expected 8", n_overflow));
    check(got.size() == 20 - 8, $sformatf("%0d words kept, expected 12", got.size()));
    check(got.size() > 0 && got[got.size()-1].last, "pulse with overflow not closed by last");
    for (int i = 0; i + 1 < got.size(); i++) check(!got[i].last, "early last flag");
    got.delete();
    // pulse ends while the FIFO is full: last must still be set on the held word
    @(negedge clk) above_ref = 1;
    repeat (4) @(negedge clk);
    fifo_full = 1;
    above_ref = 0;
    repeat (6) @(negedge clk);
    fifo_full = 0;
    repeat (4) @(negedge clk);
    check(got.size() >= 1 && got[got.size()-1].last, "held word of an ended pulse lacks last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
