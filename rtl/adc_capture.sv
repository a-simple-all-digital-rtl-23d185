`timescale 1ps/1ps
// adc_capture: keeps only the ADC samples of pulses above the reference.
//
// The ADC runs freely at the sampling clock; its samples are written to the
// ADC FIFO only while the comparator says the pulse is above a small reference
// voltage, which rejects noise such as dark-current pulses. The comparator
// output is asynchronous and is brought into the sampling-clock domain by two
// flip-flops, so the kept window lags the comparator by two sample periods.
// Only pulses whose rising edge is seen are kept: a pulse already present
// when reset is released is skipped whole, matching the TDC, which discards
// a stop edge that has no start edge.
//
// Each sample is held one cycle in 'pend' before it is written, so that the
// final sample of a pulse can carry last = 1 (the flag tells DSPU0 where a
// pulse ends). If the FIFO is full the held word waits and newer samples are
// dropped (overflow pulses high for each dropped sample); a pulse that ended
// while its word waited still gets last = 1. The last flag and the overflow
// policy are this design's choices.
module adc_capture
  import pet_pkg::*;
(
  input  logic                clk,        // sampling clock
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] adc_data,
  input  logic                above_ref,  // comparator output, asynchronous
  input  logic                fifo_full,
  output logic                wr_en,
  output adc_word_t           wr_data,
  output logic                overflow
);

  logic                en_m, en_s, en_d;  // synchroniser and its previous value
  logic                gate_q;            // inside a pulse whose rising edge was seen
  logic                on;                // keep this cycle's sample
  logic [SAMPLE_W-1:0] pend;
  logic                pend_valid;
  logic                ended;             // the pulse of 'pend' is over

  // The synchroniser resets to 'high' so that a pulse already present when
  // reset is released shows no rising edge and is ignored, as the TDC ignores
  // its stop edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {en_d, en_s, en_m} <= '1;
    else        {en_d, en_s, en_m} <= {en_s, en_m, above_ref};
  end

  assign on = en_s && (gate_q || !en_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= on;
  end

  logic write_now;
  assign write_now = pend_valid && !fifo_full;

  assign wr_en          = write_now;
  assign wr_data.sample = pend;
  assign wr_data.last   = ended || !on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      pend_valid <= 1'b0;
      ended      <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (write_now || !pend_valid) begin
        // the slot is free this cycle: load the current sample if the pulse is on
        pend_valid <= on;
        pend       <= adc_data;
        ended      <= 1'b0;
      end else begin
        // full: keep the held word, drop the new sample
        if (on) overflow <= 1'b1;
        else      ended    <= 1'b1;
      end
    end
  end

endmodule
