`timescale 1ps/1ps
// pci_board: local side of the singles processing unit's PCI interface board.
//
// Event words from the sampling units (D0..D31) are written into a 32K-word
// dual-clock FIFO; the CPLD controller empties it onto the PCI bridge's local
// bus at the board's 40 MHz local clock, and the bridge carries the data to
// the host by DMA. 'full' is the back-pressure to the sampling units. The
// board-level structure (FIFO, CPLD controller, bridge) is as published; the
// bridge, its EEPROM and the PCI connector are outside this module.
module pci_board
  import pet_pkg::*;
#(
  parameter int FIFO_AW = 15            // 32K words
) (
  // sampling-unit side
  input  logic              wclk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [WORD_W-1:0] wdata,
  output logic              full,
  // PCI9054 local bus
  input  logic              lclk,
  input  logic              lhold,
  output logic              lholda,
  input  logic              ads_n,
  input  logic              blast_n,
  input  logic              lw_r_n,
  output logic              ready_n,
  output logic [WORD_W-1:0] ld,
  output logic              ld_oe,
  output logic              dreq_n,
  output logic [FIFO_AW:0]  fifo_level
);

  logic [WORD_W-1:0] fifo_rdata;
  logic              fifo_empty, fifo_rd;

  async_fifo #(.DW(WORD_W), .AW(FIFO_AW)) u_fifo (
    .wclk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wdata(wdata), .full(full),
    .rclk(lclk), .rrst_n(rst_n), .rd_en(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty),
    .rlevel(fifo_level));

  cpld_ctrl u_cpld (
    .lclk(lclk), .rst_n(rst_n),
    .lhold(lhold), .lholda(lholda), .ads_n(ads_n), .blast_n(blast_n), .lw_r_n(lw_r_n),
    .ready_n(ready_n), .ld(ld), .ld_oe(ld_oe), .dreq_n(dreq_n),
    .fifo_rdata(fifo_rdata), .fifo_empty(fifo_empty), .fifo_rd(fifo_rd));

endmodule
