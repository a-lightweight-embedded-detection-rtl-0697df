// Behavioural model of the on-die supply seen by three TDC sensors, for
// testbenches only. It stands in for the physical coupling between the ERO
// attack circuit and the sensors, which has no RTL.
//
// Every 550 MHz edge the number of enabled ERO nodes drives a damped
// second-order droop (pole radius 0.85, resonance 20 cycles, 55 units per
// node), clamped at DMAX. Each sensor s sees
//     slowdown[s] = base[s] + gain[s]*droop + resist + drift + ripple + noise
// in the TDC's fixed point (2**14 = nominal): a static per-location offset
// (baselines of about 14, 65 and 97 taps), a per-location share of the droop,
// a benign resistive shift and a slow drift set by the testbench, an 800 kHz
// sine ripple of 120 and uniform noise of +-50. All constants are invented to
// give variances of the same order as measured hardware; they describe no
// real device. Outputs change only on clk_atk edges.
`timescale 1ps/1ps
module supply_model #(
  parameter int NS = 3,
  parameter int NH = 17
) (
  input  logic          clk_atk,
  input  logic [NH-1:0] ero_en_a,
  input  logic [NH-1:0] ero_en_b,
  input  real           resist,
  input  real           drift,
  output logic [15:0]   slowdown [NS]
);
  real base [NS] = '{13600.0, 16384.0, 18842.0};   // static slowdown per location
  real gain [NS] = '{1.0, 1.2, 1.8};               // share of the droop per location
  real droop = 0.0, droop_prev = 0.0;
  localparam real R = 0.85, C2 = 1.6168;           // 2 R cos(2 pi / 20)
  localparam real G = 55.0;                        // per active node
  localparam real DMAX = 6000.0;

  function automatic int popc(logic [NH-1:0] v);
    int c = 0;
    for (int i = 0; i < NH; i++) c += int'(v[i]);
    return c;
  endfunction

  function automatic int level(int s);
    real t, v;
    t = $realtime / 1.0e6;                         // us
    v = base[s] + gain[s] * (droop > DMAX ? DMAX : droop) + resist + drift
        + 120.0 * $sin(2.0 * 3.14159265 * 0.8 * t)
        + real'($urandom_range(0, 100)) - 50.0;
    if (v < 0.0) v = 0.0;
    if (v > 65535.0) v = 65535.0;
    return int'(v);
  endfunction

  initial for (int s = 0; s < NS; s++) slowdown[s] = 16'(int'(base[s]));

  always @(posedge clk_atk) begin
    real nxt;
    nxt = C2 * droop - R * R * droop_prev + G * real'(popc(ero_en_a) + popc(ero_en_b));
    droop_prev = droop;
    droop = nxt;
    for (int s = 0; s < NS; s++) slowdown[s] = 16'(level(s));
  end
endmodule
