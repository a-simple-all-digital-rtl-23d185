`timescale 1ps/1ps
// dspu0: event processor of a sampling unit.
//
// For every pulse it reads the pulse's samples from the ADC FIFO (up to the
// word flagged last) and the pulse's four TDC words from the TDC FIFO, and
// sends one event record of four 32-bit words:
//   w0 = {su_id[4:0], peak[7:0], energy[18:0]}
//   w1 = start coarse count (time stamp of the leading threshold crossing)
//   w2 = {2'b00, stop fine[6:0], start fine[6:0], sample count[15:0]}
//   w3 = stop coarse count (trailing crossing)
// Energy is the sum over the pulse of (sample - BASELINE), each term clipped at
// zero and the sum saturated; peak is the largest sample; the sample count
// measures the time over threshold. These are the simplest estimators of the
// energy, time and pulse-shape parameters the unit is meant to produce; the
// record layout is this design's.
//
// Handshake: ev_valid/ev_ready, a word moves when both are high; ev_last marks
// w3. Both FIFOs are first-word-fall-through and are popped one word per
// cycle. tag_error latches if the TDC words do not arrive in the expected tag
// order. All in the main-clock domain.
module dspu0
  import pet_pkg::*;
#(
  parameter logic [SU_ID_W-1:0]  SU_ID    = '0,
  parameter logic [SAMPLE_W-1:0] BASELINE = 8'd128
) (
  input  logic              clk,
  input  logic              rst_n,
  // ADC FIFO read side
  input  adc_word_t         adc_rdata,
  input  logic              adc_empty,
  output logic              adc_rd,
  // TDC FIFO read side
  input  tdc_word_t         tdc_rdata,
  input  logic              tdc_empty,
  output logic              tdc_rd,
  // event stream
  output logic [WORD_W-1:0] ev_data,
  output logic              ev_valid,
  output logic              ev_last,
  input  logic              ev_ready,
  output logic              tag_error
);

  typedef enum logic [1:0] {S_SAMPLES, S_TIMES, S_SEND} state_e;
  state_e state;

  logic [ENERGY_W-1:0] energy;
  logic [SAMPLE_W-1:0] peak;
  logic [NSAMP_W-1:0]  nsamp;
  logic [1:0]          idx;            // TDC word index, then output word index
  logic [FINE_W-1:0]   s_fine, p_fine;
  logic [WORD_W-1:0]   s_coarse, p_coarse;

  logic [SAMPLE_W-1:0] excess;
  logic [ENERGY_W:0]   energy_sum;
  assign excess     = (adc_rdata.sample > BASELINE) ? adc_rdata.sample - BASELINE : '0;
  assign energy_sum = {1'b0, energy} + (ENERGY_W+1)'(excess);

  assign adc_rd = (state == S_SAMPLES) && !adc_empty;
  assign tdc_rd = (state == S_TIMES) && !tdc_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SAMPLES;
      energy    <= '0;
      peak      <= '0;
      nsamp     <= '0;
      idx       <= '0;
      s_fine    <= '0;
      p_fine    <= '0;
      s_coarse  <= '0;
      p_coarse  <= '0;
      tag_error <= 1'b0;
    end else begin
      unique case (state)
        S_SAMPLES: if (!adc_empty) begin
          energy <= energy_sum[ENERGY_W] ? '1 : energy_sum[ENERGY_W-1:0];
          if (adc_rdata.sample > peak) peak <= adc_rdata.sample;
          if (nsamp != '1) nsamp <= nsamp + NSAMP_W'(1);
          if (adc_rdata.last) begin
            state <= S_TIMES;
            idx   <= '0;
          end
        end
        S_TIMES: if (!tdc_empty) begin
          if (tdc_rdata.tag != tdc_tag_e'(idx)) tag_error <= 1'b1;
          unique case (idx)
            2'd0: s_fine   <= tdc_rdata.data[FINE_W-1:0];
            2'd1: s_coarse <= tdc_rdata.data;
            2'd2: p_fine   <= tdc_rdata.data[FINE_W-1:0];
            default: p_coarse <= tdc_rdata.data;
          endcase
          idx <= idx + 2'd1;
          if (idx == 2'd3) state <= S_SEND;
        end
        S_SEND: if (ev_ready) begin
          idx <= idx + 2'd1;
          if (idx == 2'd3) begin
            state  <= S_SAMPLES;
            energy <= '0;
            peak   <= '0;
            nsamp  <= '0;
          end
        end
        default: state <= S_SAMPLES;
      endcase
    end
  end

  assign ev_valid = (state == S_SEND);
  assign ev_last  = (state == S_SEND) && (idx == 2'd3);

  always_comb begin
    unique case (idx)
      2'd0:    ev_data = {SU_ID, peak, energy};
      2'd1:    ev_data = s_coarse;
      2'd2:    ev_data = {2'b00, p_fine, s_fine, nsamp};
      default: ev_data = p_coarse;
    endcase
  end

endmodule
