`timescale 1ps/1ps
// pulse_source: testbench model of a detector channel's analog front end.
//
// fire(amp_mv) starts a pulse v(t) = amp * exp(-(t - t0) / TAU_NS) with an
// instantaneous rise (an LSO-like 40 ns decay). The comparator output
// above_ref is high while v > REF_MV, so it falls at t0 + TAU*ln(amp/REF).
// The ADC model presents code 128 + floor(v * 128 / 250 mV) (8 bits, +/-250 mV
// full scale, clipped) for the value at each rising sampling-clock edge.
//
// It also keeps the reference results the design should produce: the exact
// threshold-crossing times, and for the samples the design keeps (those taken
// while the comparator, delayed by a two-flip-flop synchroniser, is high) the
// energy (sum of code - 128), peak code and sample count of each pulse.
module pulse_source
  import pulse_ref_pkg::*;
#(
  parameter real REF_MV = 10.0,
  parameter real TAU_NS = 40.0
) (
  input  logic       sample_clk,
  output logic [7:0] adc_data,
  output logic       above_ref
);

  pulse_ref_t done_q[$];      // completed reference records, in pulse order
  longint     rise_q[$], fall_q[$];
  real        amp = 0.0;
  longint     t0 = 0;
  logic       s1 = 0, s2 = 0;
  int         acc_e = 0, acc_p = 0, acc_n = 0;

  initial begin
    adc_data  = 8'd128;
    above_ref = 1'b0;
  end

  function automatic logic [7:0] code_at(input longint t);
    real v;
    int  c;
    if (amp <= 0.0 || t < t0) return 8'd128;
    v = amp * $exp(-real'(t - t0) / (TAU_NS * 1000.0));
    c = 128 + int'($floor(v * 128.0 / 250.0));
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  task automatic fire(input real amp_mv);
    longint tot;
    amp = amp_mv;
    t0  = longint'($time);
    tot = longint'(TAU_NS * 1000.0 * $ln(amp_mv / REF_MV));
    rise_q.push_back(t0);
    fall_q.push_back(t0 + tot);
    above_ref = 1'b1;
    #(tot);
    above_ref = 1'b0;
  endtask

  // ADC: value for the coming edge, set half a period ahead
  always @(negedge sample_clk) adc_data <= code_at(longint'($time) + 333);

  // reference capture: synchroniser model and per-pulse sums
  always @(posedge sample_clk) begin
    if (s2) begin
      acc_e += (adc_data > 8'd128) ? int'(adc_data) - 128 : 0;
      if (int'(adc_data) > acc_p) acc_p = int'(adc_data);
      acc_n++;
      if (!s1) begin
        done_q.push_back('{t_rise: rise_q.pop_front(), t_fall: fall_q.pop_front(),
                           energy: acc_e, peak: acc_p, nsamp: acc_n});
        acc_e = 0; acc_p = 0; acc_n = 0;
      end
    end
    s2 <= s1;
    s1 <= above_ref;
  end

endmodule
