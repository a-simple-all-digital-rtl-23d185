`timescale 1ps/1ps
// tb_async_fifo: self-checking test of the dual-clock FWFT FIFO.
// Writes random words at one clock and pops them at an unrelated clock with
// random enables, comparing every popped word with a queue model; checks that
// full rises at the depth, that nothing is lost or duplicated, and that the
// FIFO ends empty.
module tb_async_fifo;
  localparam int DW = 16, AW = 3, DEPTH = 1 << AW;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial #1 {wrst_n, rrst_n} = 2'b00;   // real falling edges, so the asynchronous resets act at once
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [DW-1:0] wdata = '0, rdata;
  logic [AW:0] rlevel;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  int n_written = 0, n_read = 0, saw_full = 0;
  bit writer_done = 0;

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #5000 wclk = ~wclk;
  always #3700 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // phase 1: fill without reading until full
    repeat (DEPTH + 4) begin
      @(negedge wclk);
      wr_en = 1; wdata = DW'($urandom);
      if (!full) begin model.push_back(wdata); n_written++; end
      else saw_full++;
      @(posedge wclk);
    end
    @(negedge wclk) wr_en = 0;
    check(n_written == DEPTH, $sformatf("accepted %0d words before full, expected %0d", n_written, DEPTH));
    check(saw_full > 0, "full never seen");
    // phase 2: random traffic
    repeat (400) begin
      @(negedge wclk);
      wr_en = ($urandom % 3) != 0; wdata = DW'($urandom);
      if (wr_en && !full) begin model.push_back(wdata); n_written++; end
      @(posedge wclk);
    end
    @(negedge wclk) wr_en = 0;
    writer_done = 1;
  end

  // reader
  initial begin
    wait (n_written == DEPTH);
    repeat (20) @(posedge rclk);
    while (!(writer_done && model.size() == 0)) begin
      @(negedge rclk);
      rd_en = ($urandom % 2) == 0;
      if (rd_en && !empty) begin
        if (model.size() == 0) check(0, "pop with empty model");
        else check(rdata == model.pop_front(), "data mismatch");
        n_read++;
      end
      @(posedge rclk);
    end
    @(negedge rclk) rd_en = 0;
    repeat (10) @(posedge rclk);
    check(empty, "FIFO not empty at the end");
    check(n_read == n_written, $sformatf("read %0d of %0d", n_read, n_written));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
