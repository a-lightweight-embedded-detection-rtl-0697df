// Shared constants of the voltage-drop detection system.
//
// The detection chain turns a 128-tap TDC sample into an 8-bit Hamming
// weight, computes the variance of the last four weights and compares it with
// a fixed threshold. The numbers below are the ones of the reference
// implementation: 128 observable taps, a window of T = 4 samples, the
// threshold M = 64, a 200 MHz detection clock and 550 MHz for the attacker
// and victim side. The variance width (16 bits) and the delays and the
// slowdown input of the TDC model are this design's own choices.
package vdd_pkg;

  // TDC and Hamming weight
  localparam int unsigned N_TAPS      = 128;
  localparam int unsigned HW_W        = 8;    // 0..128 fits in 8 bits

  // Running variance: window T = 2**LOG2_T
  localparam int unsigned LOG2_T      = 2;
  localparam int unsigned VAR_W       = 16;   // max variance of 0..128 values is 4096

  // Detection threshold M
  localparam int unsigned THRESHOLD_M = 64;

  // Clocks (periods in ps)
  localparam int unsigned DET_CLK_PS  = 5000; // 200 MHz detection domain

  // TDC behavioural model
  localparam int unsigned INIT_DELAY_PS = 1860; // initial delay line
  localparam int unsigned ELEM_DELAY_PS = 10;   // one observable element
  localparam int unsigned SLOW_W        = 16;   // slowdown input width
  localparam int unsigned SLOW_FRAC     = 14;   // 2**14 = nominal supply

  // Attack circuit: two halves of ERO nodes
  localparam int unsigned N_NODES     = 34;
  localparam int unsigned DUR_W       = 16;

endpackage
