`timescale 1ps/1ps
// tb_tdc_main_counter: checks increment per clock, synchronous clear,
// wrap-around at 2**W and asynchronous reset, against a reference count.
module tb_tdc_main_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 1, sync_clr = 0;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;

  tdc_main_counter #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 check(count == 0, "not zero in reset");
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 700; k++) begin
      sync_clr = ($urandom % 97) == 0;
      @(posedge clk);
      ref_cnt = sync_clr ? 0 : (ref_cnt + 1) % (1 << W);
      #1 check(count == W'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt));
      @(negedge clk);
    end
    rst_n = 0;
    #1 check(count == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
