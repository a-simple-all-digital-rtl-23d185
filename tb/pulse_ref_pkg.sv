`timescale 1ps/1ps
// pulse_ref_pkg: reference record of one detector pulse, kept by the testbench
// pulse source: exact threshold-crossing times (ps) and the energy, peak and
// sample count the sampling unit should report for it.
package pulse_ref_pkg;
  typedef struct {
    longint t_rise;
    longint t_fall;
    int     energy;
    int     peak;
    int     nsamp;
  } pulse_ref_t;
endpackage
