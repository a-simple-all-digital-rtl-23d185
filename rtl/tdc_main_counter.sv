`timescale 1ps/1ps
// tdc_main_counter: free-running count of main-clock periods.
//
// This is the coarse part of the Nutt time measurement and the system time of
// a sampling unit: every rising main-clock edge increments count by one, so a
// count value n labels the edge at which the counter became n. sync_clr sets
// the count to zero on the next edge, which lets several units start their
// time from a common instant (the original system asks for synchronised time stamps
// but gives no mechanism; the clear is this design's choice, as is the width).
module tdc_main_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync_clr,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (sync_clr) count <= '0;
    else               count <= count + W'(1);
  end

endmodule
