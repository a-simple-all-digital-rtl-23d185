`timescale 1ps/1ps
// pet_pkg: constants and types shared by the digital PET front end.
//
// The sampling unit digitises a detector pulse with an 8-bit ADC and time-stamps
// its threshold crossings with a Nutt-interpolation TDC (two 126-cell delay
// lines plus a main-clock counter). The 8-bit sample width, the 126 cells and
// the 75 MHz main clock come from the system description; the word formats
// below (ADC FIFO word, tagged TDC word, 4-word event record) are this
// design's own choice.
package pet_pkg;

  localparam int SAMPLE_W    = 8;    // ADC resolution (MAX108: 8 bits)
  localparam int CELLS       = 126;  // delay cells per TDC line (Q1..Q126)
  localparam int FINE_W      = 7;    // enough for a count of 0..126 fired cells
  localparam int COARSE_W    = 32;   // main-counter width
  localparam int WORD_W      = 32;   // event words, D0..D31 of the PCI board FIFO
  localparam int SU_ID_W     = 5;    // up to 32 sampling units per SPU
  localparam int ENERGY_W    = 19;
  localparam int NSAMP_W     = 16;

  // Word written to the ADC FIFO: one sample plus an end-of-pulse flag.
  typedef struct packed {
    logic                last;
    logic [SAMPLE_W-1:0] sample;
  } adc_word_t;

  // The TDC output multiplexer sends four tagged words per measurement.
  typedef enum logic [1:0] {
    TAG_START_FINE   = 2'd0,  // fired cells of the start line
    TAG_START_COARSE = 2'd1,  // main count labelling the clock edge after the start edge
    TAG_STOP_FINE    = 2'd2,  // fired cells of the stop line
    TAG_STOP_COARSE  = 2'd3   // main count labelling the clock edge after the stop edge
  } tdc_tag_e;

  typedef struct packed {
    tdc_tag_e          tag;
    logic [WORD_W-1:0] data;
  } tdc_word_t;

  // Number of ones in a delay-line snapshot (bubble tolerant fine code).
  function automatic logic [FINE_W-1:0] count_fired(input logic [CELLS-1:0] q);
    logic [FINE_W-1:0] n;
    n = '0;
    for (int i = 0; i < CELLS; i++) n = n + FINE_W'(q[i]);
    return n;
  endfunction

endpackage
