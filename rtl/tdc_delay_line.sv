`timescale 1ps/1ps
// tdc_delay_line: behavioural model of one TDC interpolation delay line.
//
// Behavioural model (not synthesizable): the delays stand for FPGA carry and
// routing delays, which no synthesis tool can create from RTL.
//
// An input flip-flop with D tied high is set by the rising edge of 'start'.
// A second flip-flop copies it on the next rising main-clock edge; its output
// is 'hit'. The start flip-flop's output then runs down a chain of TAU1_PS
// delays and 'hit' down a chain of TAU2_PS delays; cell i holds a flip-flop
// clocked by the i-th 'hit' tap that records whether the i-th start tap has
// already risen. The clock signal gains TAU1_PS-TAU2_PS per cell on the start
// signal, so the number of fired cells is
//     floor((t_clockedge - t_start) / (TAU1_PS - TAU2_PS))   (at most CELLS),
// a thermometer code of the time from the start edge to the next clock edge.
// 'reset' (active high, asynchronous) clears every flip-flop and re-arms the
// line. q is stable CELLS*TAU2_PS after 'hit' rises and until reset.
// The start and cell flip-flops also power up cleared, as FPGA registers do:
// the start flip-flop has no clock, so a reset that is already high at power-up
// could not clear it otherwise.
//
// The two-flip-flop front end, the two delays per cell and the 126 cells follow
// the published structure; which delay chain clocks the cell flip-flop, and the
// split of the resolution into TAU1_PS and TAU2_PS, are this model's reading.
module tdc_delay_line #(
  parameter int CELLS   = 126,
  parameter int TAU1_PS = 216,
  parameter int TAU2_PS = 20
) (
  input  logic             start,
  input  logic             clk,
  input  logic             reset,
  output logic [CELLS-1:0] q,      // q[i-1] is cell output Q_i
  output logic             hit
);

  logic s_q = 1'b0;   // FPGA registers power up cleared; this one has no clock to reset it by

  always_ff @(posedge start or posedge reset) begin
    if (reset) s_q <= 1'b0;
    else       s_q <= 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) hit <= 1'b0;
    else       hit <= s_q;
  end

  wire [CELLS:0] s_tap;
  wire [CELLS:0] c_tap;
  assign s_tap[0] = s_q;
  assign c_tap[0] = hit;

  for (genvar i = 1; i <= CELLS; i++) begin : g_cell
    logic cell_q = 1'b0;
    assign #(TAU1_PS) s_tap[i] = s_tap[i-1];
    assign #(TAU2_PS) c_tap[i] = c_tap[i-1];
    always_ff @(posedge c_tap[i] or posedge reset) begin
      if (reset) cell_q <= 1'b0;
      else       cell_q <= s_tap[i];
    end
    assign q[i-1] = cell_q;
  end

endmodule
