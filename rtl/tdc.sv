`timescale 1ps/1ps
// tdc: Nutt-interpolation time-to-digital converter.
//
// Two delay lines interpolate inside one main-clock period T: the start line
// measures the time from the start edge to the next clock edge, the stop line
// does the same for the stop edge, and the main counter (an input here, shared
// with the rest of the sampling unit) gives the whole periods. With the tagged
// words this module outputs, the interval is
//   (STOP_COARSE - START_COARSE) * T + START_FINE * LSB_start - STOP_FINE * LSB_stop
// and an edge's absolute time is COARSE * T - FINE * LSB. The line resolutions
// default to the measured 196 ps (start) and 256 ps (stop); at 75 MHz these
// cover one period with 68 and 52 active cells.
//
// Control (main-clock domain, this design's own): a line's 'hit' rises on the
// clock edge after its input edge; on the following edge the fine code (number
// of fired cells) and the current count are captured. Once both lines have
// captured, the output multiplexer emits four words on four consecutive cycles
// (START_FINE, START_COARSE, STOP_FINE, STOP_COARSE, out_valid high), then both
// lines are held in reset for CLEAR_CYCLES clocks and 'armed' rises again: the
// TDC is dead for 2 + 4 + CLEAR_CYCLES + 1 clocks after the stop edge. A stop edge that
// arrives while no start has been captured (a pulse already under way when the
// TDC was re-armed) is discarded by resetting the stop line alone.
// The outputs have no back-pressure: the consumer (a FIFO) must accept them.
module tdc
  import pet_pkg::*;
#(
  parameter int START_TAU1_PS = 216,   // start line resolution 216-20 = 196 ps
  parameter int START_TAU2_PS = 20,
  parameter int STOP_TAU1_PS  = 276,   // stop line resolution 276-20 = 256 ps
  parameter int STOP_TAU2_PS  = 20,
  // Lines are held in reset this many clocks after a measurement; it must cover
  // CELLS * TAU1 (the time the start chain takes to empty): 34.8 ns for the
  // stop line, under three 75 MHz periods.
  parameter int CLEAR_CYCLES  = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                stop,
  input  logic [COARSE_W-1:0] count,
  output logic                out_valid,
  output tdc_word_t           out_word,
  output logic                armed
);

  typedef enum logic [2:0] {S_WAIT, S_EMIT0, S_EMIT1, S_EMIT2, S_EMIT3, S_CLEAR} state_e;
  state_e state;

  logic [CELLS-1:0] q_start, q_stop;
  logic             hit_start, hit_stop;
  logic             clr_start, clr_stop;
  logic             rst_start_line, rst_stop_line;

  assign rst_start_line = !rst_n || clr_start;
  assign rst_stop_line  = !rst_n || clr_stop;

  tdc_delay_line #(.CELLS(CELLS), .TAU1_PS(START_TAU1_PS), .TAU2_PS(START_TAU2_PS)) u_start_line (
    .start(start), .clk(clk), .reset(rst_start_line), .q(q_start), .hit(hit_start));

  tdc_delay_line #(.CELLS(CELLS), .TAU1_PS(STOP_TAU1_PS), .TAU2_PS(STOP_TAU2_PS)) u_stop_line (
    .start(stop), .clk(clk), .reset(rst_stop_line), .q(q_stop), .hit(hit_stop));

  logic                s_done, p_done;
  logic [3:0]          clr_cnt;
  logic [FINE_W-1:0]   s_fine, p_fine;
  logic [COARSE_W-1:0] s_coarse, p_coarse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      s_done    <= 1'b0;
      p_done    <= 1'b0;
      s_fine    <= '0;
      p_fine    <= '0;
      s_coarse  <= '0;
      p_coarse  <= '0;
      clr_start <= 1'b0;
      clr_stop  <= 1'b0;
      clr_cnt   <= '0;
    end else begin
      clr_start <= 1'b0;
      clr_stop  <= 1'b0;
      unique case (state)
        S_WAIT: begin
          if (hit_start && !s_done) begin
            s_done   <= 1'b1;
            s_fine   <= count_fired(q_start);
            s_coarse <= count;
          end
          if (hit_stop && !p_done) begin
            if (s_done || hit_start) begin
              p_done   <= 1'b1;
              p_fine   <= count_fired(q_stop);
              p_coarse <= count;
            end else begin
              clr_stop <= 1'b1;          // orphan stop edge: re-arm the stop line
            end
          end
          if (s_done && p_done) state <= S_EMIT0;
        end
        S_EMIT0: state <= S_EMIT1;
        S_EMIT1: state <= S_EMIT2;
        S_EMIT2: state <= S_EMIT3;
        S_EMIT3: begin
          state     <= S_CLEAR;
          clr_start <= 1'b1;
          clr_stop  <= 1'b1;
          s_done    <= 1'b0;
          p_done    <= 1'b0;
          clr_cnt   <= 4'(CLEAR_CYCLES - 1);
        end
        S_CLEAR: begin
          if (clr_cnt != '0) begin
            clr_cnt   <= clr_cnt - 4'd1;
            clr_start <= 1'b1;
            clr_stop  <= 1'b1;
          end else begin
            state <= S_WAIT;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Output multiplexer: selects the start line, the stop line or the counter.
  always_comb begin
    out_valid     = 1'b1;
    out_word.tag  = TAG_START_FINE;
    out_word.data = '0;
    unique case (state)
      S_EMIT0: begin out_word.tag = TAG_START_FINE;   out_word.data = WORD_W'(s_fine); end
      S_EMIT1: begin out_word.tag = TAG_START_COARSE; out_word.data = s_coarse;        end
      S_EMIT2: begin out_word.tag = TAG_STOP_FINE;    out_word.data = WORD_W'(p_fine); end
      S_EMIT3: begin out_word.tag = TAG_STOP_COARSE;  out_word.data = p_coarse;        end
      default: out_valid = 1'b0;
    endcase
  end

  assign armed = (state == S_WAIT) && !s_done && !clr_start;

endmodule
