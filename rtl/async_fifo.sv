`timescale 1ps/1ps
// async_fifo: dual-clock first-in first-out buffer with first-word-fall-through.
//
// Used three times in the front end: for ADC samples (written at the sampling
// clock, read at the main clock), for TDC words, and as the 32K-word buffer of
// the PCI interface board (written from the sampling units, read at the 40 MHz
// local clock). The board part is a 32K x 36 dual-clock FIFO; here its depth
// is kept and the width is the 32 data bits the board carries.
//
// Pointers are AW+1 bits, binary in their own domain and Gray-coded across it
// through two flip-flops. The head word is always on rdata while empty is low
// (first-word-fall-through): rd_en pops it. Writes while full and reads while
// empty are ignored. rlevel is the read side's (conservative) fill count.
// Each side has its own active-low asynchronous reset; both must be applied
// together.
module async_fifo #(
  parameter int DW = 32,
  parameter int AW = 4            // depth = 2**AW, AW >= 2
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   rlevel
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr_en && !full) begin
      wbin  <= wbin_next;
      wgray <= bin2gray(wbin_next);
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) {rgray_w2, rgray_w1} <= '0;
    else         {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rlevel = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en && !empty) begin
      rbin  <= rbin_next;
      rgray <= bin2gray(rbin_next);
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) {wgray_r2, wgray_r1} <= '0;
    else         {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
  end

endmodule
