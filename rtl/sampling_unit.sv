`timescale 1ps/1ps
// sampling_unit: one detector channel, from ADC code and comparator to events.
//
// The ADC samples the pulse freely at the sampling clock; adc_capture keeps
// the samples taken while the comparator reports the pulse above the reference
// and writes them into the ADC FIFO, which crosses to the main clock. The TDC
// time-stamps the comparator's rising edge (Start) and falling edge (Stop,
// the inverted comparator output) against the main counter and writes four
// tagged words per pulse into the TDC FIFO. DSPU0 pairs each pulse's samples
// with its TDC words and emits a 4-word event record.
//
// Structure as published: ADC -> FIFO -> DSPU0, TDC -> FIFO -> DSPU0, with the
// comparator enabling both. Choices of this design: which comparator edges
// start and stop the TDC, the FIFO depths, the word formats.
// Pulses must be at least one sample period long and separated by the TDC's
// dead time (about six main-clock periods after the stop edge); otherwise the
// pairing of samples and time stamps would slip.
module sampling_unit
  import pet_pkg::*;
#(
  parameter logic [SU_ID_W-1:0] SU_ID       = '0,
  parameter int                 ADC_FIFO_AW = 10,
  parameter int                 TDC_FIFO_AW = 4
) (
  input  logic                sample_clk,
  input  logic                main_clk,
  input  logic                rst_n,
  input  logic [COARSE_W-1:0] count,       // main counter (system time)
  input  logic [SAMPLE_W-1:0] adc_data,
  input  logic                above_ref,
  output logic [WORD_W-1:0]   ev_data,
  output logic                ev_valid,
  output logic                ev_last,
  input  logic                ev_ready,
  output logic                adc_overflow,
  output logic                tdc_overflow,
  output logic                tag_error
);

  // ADC path
  logic      adc_wr, adc_full, adc_rd, adc_empty;
  adc_word_t adc_wdata, adc_rdata;

  adc_capture u_capture (
    .clk(sample_clk), .rst_n(rst_n), .adc_data(adc_data), .above_ref(above_ref),
    .fifo_full(adc_full), .wr_en(adc_wr), .wr_data(adc_wdata), .overflow(adc_overflow));

  async_fifo #(.DW($bits(adc_word_t)), .AW(ADC_FIFO_AW)) u_adc_fifo (
    .wclk(sample_clk), .wrst_n(rst_n), .wr_en(adc_wr), .wdata(adc_wdata), .full(adc_full),
    .rclk(main_clk), .rrst_n(rst_n), .rd_en(adc_rd), .rdata(adc_rdata), .empty(adc_empty),
    .rlevel());

  // TDC path
  logic      tdc_valid, tdc_full, tdc_rd, tdc_empty, tdc_armed;
  tdc_word_t tdc_wdata, tdc_rdata;

  tdc u_tdc (
    .clk(main_clk), .rst_n(rst_n), .start(above_ref), .stop(!above_ref), .count(count),
    .out_valid(tdc_valid), .out_word(tdc_wdata), .armed(tdc_armed));

  async_fifo #(.DW($bits(tdc_word_t)), .AW(TDC_FIFO_AW)) u_tdc_fifo (
    .wclk(main_clk), .wrst_n(rst_n), .wr_en(tdc_valid), .wdata(tdc_wdata), .full(tdc_full),
    .rclk(main_clk), .rrst_n(rst_n), .rd_en(tdc_rd), .rdata(tdc_rdata), .empty(tdc_empty),
    .rlevel());

  assign tdc_overflow = tdc_valid && tdc_full;

  dspu0 #(.SU_ID(SU_ID)) u_dspu0 (
    .clk(main_clk), .rst_n(rst_n),
    .adc_rdata(adc_rdata), .adc_empty(adc_empty), .adc_rd(adc_rd),
    .tdc_rdata(tdc_rdata), .tdc_empty(tdc_empty), .tdc_rd(tdc_rd),
    .ev_data(ev_data), .ev_valid(ev_valid), .ev_last(ev_last), .ev_ready(ev_ready),
    .tag_error(tag_error));

endmodule
