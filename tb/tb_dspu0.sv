`timescale 1ps/1ps
// tb_dspu0: checks the event records built by DSPU0.
// The two FIFO read ports are modelled by queues (first-word-fall-through).
// Random pulses (random samples around the baseline, random length) and
// random TDC words are queued; every 4-word record is compared with the
// energy (clipped, baseline-subtracted sum), peak, sample count and time
// fields computed here. The output handshake is throttled at random, the
// last flag must mark word 3, and a wrong TDC tag order must raise tag_error.
module tb_dspu0;
  import pet_pkg::*;
  localparam logic [SU_ID_W-1:0] ID = 5'd19;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  adc_word_t adc_rdata;
  tdc_word_t tdc_rdata;
  logic adc_empty, adc_rd, tdc_empty, tdc_rd;
  logic [WORD_W-1:0] ev_data;
  logic ev_valid, ev_last, ev_ready = 0, tag_error;
  int checks = 0, failures = 0;

  dspu0 #(.SU_ID(ID)) dut (.*);
  always #6667 clk = ~clk;

  adc_word_t aq[$];
  tdc_word_t tq[$];
  logic [WORD_W-1:0] expq[$];
  assign adc_empty = (aq.size() == 0);
  assign tdc_empty = (tq.size() == 0);
  assign adc_rdata = adc_empty ? '0 : aq[0];
  assign tdc_rdata = tdc_empty ? '0 : tq[0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the queues are popped half a clock after the edge that consumed their heads
  logic apop = 0, tpop = 0;
  always @(negedge clk) begin
    if (apop) void'(aq.pop_front());
    if (tpop) void'(tq.pop_front());
  end

  int n_words = 0;
  bit ignore_rest = 0;
  always @(posedge clk) begin
    apop <= adc_rd && !adc_empty;
    tpop <= tdc_rd && !tdc_empty;
    if (ev_valid && ev_ready) begin
      if (ignore_rest) ;   // the malformed event's record is not checked word by word
      else if (expq.size() == 0) check(0, "unexpected output word");
      else begin
        logic [WORD_W-1:0] e;
        e = expq.pop_front();
        check(ev_data == e, $sformatf("word %0d: got %h expected %h", n_words % 4, ev_data, e));
        check(ev_last == (n_words % 4 == 3), "last flag");
      end
      n_words++;
    end
  end
  always @(negedge clk) ev_ready <= ($urandom % 4) != 0;

  task automatic make_event(input int len, input int amp);
    int e = 0, pk = 0, s;
    logic [6:0] sf, pf;
    logic [31:0] sc, pc;
    for (int i = 0; i < len; i++) begin
      s = 128 + amp * (i + 1) / len - ($urandom % 40);   // rising ramp with noise
      if (s > 255) s = 255;
      if (s < 0) s = 0;
      if (s > 128) e += s - 128;
      if (s > pk) pk = s;
      aq.push_back('{last: (i == len - 1), sample: 8'(s)});
    end
    if (e > (1 << ENERGY_W) - 1) e = (1 << ENERGY_W) - 1;
    sf = 7'($urandom % 69); pf = 7'($urandom % 53); sc = $urandom; pc = sc + 32'($urandom % 100);
    tq.push_back('{tag: TAG_START_FINE,   data: 32'(sf)});
    tq.push_back('{tag: TAG_START_COARSE, data: sc});
    tq.push_back('{tag: TAG_STOP_FINE,    data: 32'(pf)});
    tq.push_back('{tag: TAG_STOP_COARSE,  data: pc});
    expq.push_back({ID, 8'(pk), 19'(e)});
    expq.push_back(sc);
    expq.push_back({2'b00, pf, sf, 16'(len)});
    expq.push_back(pc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      make_event(1 + $urandom % 300, (k % 3 == 2) ? 400 : 40 + $urandom % 120);
      while (expq.size() > 0) @(negedge clk);
    end
    // saturation: 4000 full-scale samples would exceed 19 bits
    @(negedge clk);
    make_event(4000, 1000);
    while (expq.size() > 0) @(negedge clk);
    check(!tag_error, "tag_error raised on well-formed input");
    // wrong tag order must be flagged
    @(negedge clk);
    ignore_rest = 1;
    aq.push_back('{last: 1'b1, sample: 8'd200});
    tq.push_back('{tag: TAG_START_COARSE, data: 32'd1});
    tq.push_back('{tag: TAG_START_FINE,   data: 32'd1});
    tq.push_back('{tag: TAG_STOP_FINE,    data: 32'd1});
    tq.push_back('{tag: TAG_STOP_COARSE,  data: 32'd1});
    repeat (20) @(negedge clk);
    check(tag_error, "tag_error not raised");
    check(n_words == 61 * 4 + 4, $sformatf("%0d words out", n_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
