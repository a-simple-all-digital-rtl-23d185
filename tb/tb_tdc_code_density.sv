`timescale 1ps/1ps
// tb_tdc_code_density: the code-density test of the TDC at 75 MHz.
// 7,000 start edges and 7,000 stop edges (a tenth of the usual 70,000, to
// keep the run short) are placed at uniformly random instants within the
// clock period. For each line the histogram n_j of fine
// codes is built; the active cells are the codes that occur (a code holding
// less than half an average bin is the period's remainder, not a cell). The
// checks: 68 active start-line cells and 52 active stop-line cells, mean
// resolutions T/M of 196 ps and 256 ps to within 1 ps, and the accumulated
// error E_i = sum_{j=K..i} (n_j/N - 1/M) within 0.05 LSB for every i (the
// model's cells are ideal, so only counting noise and the partial last bin
// remain).
module tb_tdc_code_density;
  import pet_pkg::*;
  localparam int HALF = 6667, T = 2 * HALF;
  localparam int N = 7000;   // a tenth of the 70,000 of the original test, for run time
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
    #20_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist_s[CELLS+1], hist_p[CELLS+1];
  int n_meas = 0;
  always @(posedge clk) if (out_valid) begin
    if (out_word.tag == TAG_START_FINE) hist_s[out_word.data] = hist_s[out_word.data] + 1;
    if (out_word.tag == TAG_STOP_FINE) begin
      hist_p[out_word.data] = hist_p[out_word.data] + 1;
      n_meas++;
    end
  end

  task automatic analyse(input string name, input int hist[CELLS+1], input int exp_m, input real exp_lsb);
    int k = -1, p = -1, m = 0;
    real e, emax = 0.0, lsb;
    for (int j = 0; j <= CELLS; j++) if (real'(hist[j]) > 0.5 * real'(N) / real'(exp_m)) begin
      if (k < 0) k = j;
      p = j;
      m++;
    end
    lsb = real'(T) / real'(m);
    e = 0.0;
    for (int j = k; j <= p; j++) begin
      e += real'(hist[j]) / real'(N) - 1.0 / real'(m);
      if ((e < 0 ? -e : e) > emax) emax = (e < 0 ? -e : e);
    end
    $display("%s line: K=%0d P=%0d M=%0d active cells, mean resolution %0.1f ps, max |E| = %0.4f LSB",
             name, k, p, m, lsb, emax);
    check(m == exp_m, $sformatf("%s line: %0d active cells, expected %0d", name, m, exp_m));
    check((lsb - exp_lsb < 1.0) && (exp_lsb - lsb < 1.0), $sformatf("%s line resolution %0.1f ps", name, lsb));
    check(emax < 0.05, $sformatf("%s line accumulated error %0.4f LSB", name, emax));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      while (!armed) @(posedge clk);
      @(posedge clk);
      #(1 + $urandom % (T - 1));
      start = 1;
      repeat (2) @(posedge clk);
      #(1 + $urandom % (T - 1));
      stop = 1;
      @(posedge clk);
      start = 0;
      stop = 0;
      while (n_meas < i + 1) @(posedge clk);
    end
    check(n_meas == N, "measurement count");
    analyse("start", hist_s, 68, 196.0);
    analyse("stop", hist_p, 52, 256.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
