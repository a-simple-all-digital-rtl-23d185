`timescale 1ps/1ps
// cpld_ctrl: controller between the board FIFO and the PCI bridge's local bus.
//
// The PCI bridge (a PCI9054 in C mode) is the local-bus master: it moves the
// event data to the host by DMA, reading the local bus in bursts. This
// controller is the local-bus arbiter and the slave that answers those reads:
//   * LHOLD from the bridge is answered with LHOLDA one local clock later and
//     LHOLDA falls one clock after LHOLD does.
//   * ADS# low for one clock marks an address phase; LW/R# gives the direction.
//     Data phases follow from the next clock on. In a read data phase READY#
//     is driven low whenever the FIFO holds a word, with that word on LD, and
//     the word is popped at the clock edge; while the FIFO is empty READY#
//     stays high (wait state). The access ends at the edge where both READY#
//     and BLAST# are low.
//   * Writes from the bridge are acknowledged (READY# low) and discarded.
//   * DREQ# (DMA demand request) is low, one clock after the fact, whenever the
//     FIFO is not empty, so demand-mode DMA runs while events are waiting.
// READY# and LD follow the first-word-fall-through FIFO combinationally so a
// burst can move one 32-bit word per local clock (160 MB/s at 40 MHz).
// The controller's task (moving data between FIFO and bridge) is as published;
// the bus signals and their timing come from the bridge's local-bus protocol
// and are this design's reading of it.
module cpld_ctrl
  import pet_pkg::*;
(
  input  logic              lclk,
  input  logic              rst_n,
  // PCI9054 local bus
  input  logic              lhold,
  output logic              lholda,
  input  logic              ads_n,
  input  logic              blast_n,
  input  logic              lw_r_n,
  output logic              ready_n,
  output logic [WORD_W-1:0] ld,
  output logic              ld_oe,
  output logic              dreq_n,
  // board FIFO read side
  input  logic [WORD_W-1:0] fifo_rdata,
  input  logic              fifo_empty,
  output logic              fifo_rd
);

  logic in_data;    // inside the data phases of an access
  logic is_write;

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) begin
      lholda   <= 1'b0;
      dreq_n   <= 1'b1;
      in_data  <= 1'b0;
      is_write <= 1'b0;
    end else begin
      lholda <= lhold;
      dreq_n <= fifo_empty;
      if (!in_data) begin
        if (!ads_n && lholda) begin
          in_data  <= 1'b1;
          is_write <= lw_r_n;
        end
      end else if (!ready_n && !blast_n) begin
        in_data <= 1'b0;
      end
    end
  end

  always_comb begin
    ready_n = 1'b1;
    fifo_rd = 1'b0;
    if (in_data) begin
      if (is_write) begin
        ready_n = 1'b0;
      end else if (!fifo_empty) begin
        ready_n = 1'b0;
        fifo_rd = 1'b1;
      end
    end
  end

  assign ld    = fifo_rdata;
  assign ld_oe = in_data && !is_write;

endmodule
