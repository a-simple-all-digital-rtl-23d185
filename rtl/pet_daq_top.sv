`timescale 1ps/1ps
// pet_daq_top: the digital data-acquisition front end of the PET system.
//
// NUM_SU sampling units share one main counter (the system time) and one PCI
// interface board. Each unit turns its ADC codes and comparator output into
// 4-word event records (energy, peak, time over threshold, start and stop time
// stamps); su_merge interleaves whole records from the units into the board's
// FIFO, and the board's controller hands them to the PCI bridge's local bus
// for DMA to the singles-processing PC. The ADCs, comparators and the PCI
// bridge are external chips; their signals are the ports of this module.
//
// Clocks: sample_clk (1.5 GHz) for ADC capture, main_clk (75 MHz) for the TDCs,
// DSPU0s and the board FIFO's write side, lclk (40 MHz) for the local bus.
// rst_n is asserted asynchronously and must be released while no pulse is
// present. time_clr restarts the system time in all units at once.
module pet_daq_top
  import pet_pkg::*;
#(
  parameter int NUM_SU        = 2,
  parameter int BOARD_FIFO_AW = 15
) (
  input  logic                            sample_clk,
  input  logic                            main_clk,
  input  logic                            lclk,
  input  logic                            rst_n,
  input  logic                            time_clr,
  input  logic [NUM_SU-1:0][SAMPLE_W-1:0] adc_data,
  input  logic [NUM_SU-1:0]               above_ref,
  // PCI9054 local bus
  input  logic                            lhold,
  output logic                            lholda,
  input  logic                            ads_n,
  input  logic                            blast_n,
  input  logic                            lw_r_n,
  output logic                            ready_n,
  output logic [WORD_W-1:0]               ld,
  output logic                            ld_oe,
  output logic                            dreq_n,
  // status
  output logic [NUM_SU-1:0]               adc_overflow,
  output logic [NUM_SU-1:0]               tdc_overflow,
  output logic [NUM_SU-1:0]               tag_error,
  output logic [BOARD_FIFO_AW:0]          board_fifo_level
);

  logic [COARSE_W-1:0] count;

  tdc_main_counter #(.W(COARSE_W)) u_counter (
    .clk(main_clk), .rst_n(rst_n), .sync_clr(time_clr), .count(count));

  logic [NUM_SU-1:0][WORD_W-1:0] su_data;
  logic [NUM_SU-1:0]             su_valid, su_last, su_ready;

  for (genvar i = 0; i < NUM_SU; i++) begin : g_su
    sampling_unit #(.SU_ID(SU_ID_W'(i))) u_su (
      .sample_clk(sample_clk), .main_clk(main_clk), .rst_n(rst_n), .count(count),
      .adc_data(adc_data[i]), .above_ref(above_ref[i]),
      .ev_data(su_data[i]), .ev_valid(su_valid[i]), .ev_last(su_last[i]), .ev_ready(su_ready[i]),
      .adc_overflow(adc_overflow[i]), .tdc_overflow(tdc_overflow[i]), .tag_error(tag_error[i]));
  end

  logic [WORD_W-1:0] m_data;
  logic              m_valid, m_last, board_full;

  su_merge #(.N(NUM_SU)) u_merge (
    .clk(main_clk), .rst_n(rst_n),
    .in_data(su_data), .in_valid(su_valid), .in_last(su_last), .in_ready(su_ready),
    .out_data(m_data), .out_valid(m_valid), .out_last(m_last), .out_ready(!board_full));

  pci_board #(.FIFO_AW(BOARD_FIFO_AW)) u_board (
    .wclk(main_clk), .rst_n(rst_n), .wr_en(m_valid), .wdata(m_data), .full(board_full),
    .lclk(lclk), .lhold(lhold), .lholda(lholda), .ads_n(ads_n), .blast_n(blast_n), .lw_r_n(lw_r_n),
    .ready_n(ready_n), .ld(ld), .ld_oe(ld_oe), .dreq_n(dreq_n), .fifo_level(board_fifo_level));

endmodule
