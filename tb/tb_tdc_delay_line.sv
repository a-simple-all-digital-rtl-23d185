`timescale 1ps/1ps
// tb_tdc_delay_line: checks the delay-line model against the interpolation law.
// For random start instants within a 75 MHz clock period it checks that 'hit'
// rises on the first clock edge after the start edge, that the cells form a
// thermometer code (Q1..Qn set, the rest clear) and that
// n = floor((t_clockedge - t_start) / (TAU1 - TAU2)); then that reset clears it.
// Reset is held for CELLS*TAU1 so the start chain has emptied before the next edge.
module tb_tdc_delay_line;
  localparam int CELLS = 126, TAU1 = 216, TAU2 = 20, LSB = TAU1 - TAU2;
  localparam int HALF = 6667, T = 2 * HALF;   // 75 MHz main clock
  logic start = 0, clk = 0, reset = 1, hit;
  logic [CELLS-1:0] q;
  int checks = 0, failures = 0;

  tdc_delay_line #(.CELLS(CELLS), .TAU1_PS(TAU1), .TAU2_PS(TAU2)) dut (.*);

  always #HALF clk = ~clk;

  time t_edge;
  always @(posedge clk) t_edge = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_thermo(input logic [CELLS-1:0] v, input int n);
    for (int i = 0; i < CELLS; i++) if (v[i] != (i < n)) return 0;
    return 1;
  endfunction

  initial begin
    int off, exp_n;
    time t_s, t_c;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);
      // start edge at a random offset in the period, away from exact ties
      off = 60 + ($urandom % (T - 120));
      if (((T - off) % LSB) < 3 || ((T - off) % LSB) > LSB - 3) off += 7;
      #(off);
      t_s = $time;
      start = 1;
      @(posedge clk);
      t_c = $time;
      #1;
      check(hit == 1'b1, "hit not set on the first clock edge after start");
      #(CELLS * TAU2 + 50);
      exp_n = int'((t_c - t_s) / LSB);
      if (exp_n > CELLS) exp_n = CELLS;
      check(is_thermo(q, exp_n), $sformatf("k=%0d interval %0t ps: got %0d fired cells (%b), expected %0d",
                                           k, t_c - t_s, $countones(q), q[15:0], exp_n));
      start = 0;
      reset = 1;
      #(CELLS * TAU1 + 100);   // the start chain needs this long to empty
      check(q == '0 && hit == 1'b0, "reset did not clear the line");
      reset = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
