// Behavioural model of a TDC (time-to-digital converter) voltage sensor.
// This is not synthesizable hardware in the intended sense: the real sensor
// is a physical delay line (a LUT-based initial delay followed by a 128-bit
// CARRY8 carry chain) whose timing, not logic, carries the information.
//
// The clock drives both the delay line and the sampling chain of flip-flops.
// At each rising edge the flip-flop of tap i stores the clock as it was
//     D_i = (INIT_DELAY_PS + (i+1)*ELEM_DELAY_PS) * slowdown
// earlier: a 1 when D_i modulo the clock period lies in the second half of
// the period (the clock was high then), a 0 otherwise. `slowdown` stands for
// the local supply voltage and process corner: every gate of the line is
// slowed by the same factor, 1.0 at nominal supply, larger under a voltage
// drop. The output is a thermometer code whose edge moves towards tap 0 as
// the line slows, so a drop raises the number of ones. A badly calibrated
// initial delay, or a large shift, gives all 0s, all 1s or a wrapped code, as
// on the real sensor.
//
// Interface: clk (sampling and driving clock), slowdown (unsigned fixed point,
// 2**14 = 1.0), taps (the registered sampling chain, tap 0 nearest the
// initial delay line). One sample per clock cycle; taps change one edge after
// slowdown. The 128 taps and the 200 MHz clock follow the reference design;
// the uniform element delay of 10 ps, the tap order, the initial delay of
// 1860 ps (mid-scale at nominal supply) and the slowdown input are this
// model's own.
module tdc_sensor #(
  parameter int unsigned N_TAPS        = vdd_pkg::N_TAPS,
  parameter int unsigned CLK_PERIOD_PS = vdd_pkg::DET_CLK_PS,
  parameter int unsigned INIT_DELAY_PS = vdd_pkg::INIT_DELAY_PS,
  parameter int unsigned ELEM_DELAY_PS = vdd_pkg::ELEM_DELAY_PS,
  localparam int unsigned SLOW_W       = vdd_pkg::SLOW_W,
  localparam int unsigned SLOW_FRAC    = vdd_pkg::SLOW_FRAC
) (
  input  logic              clk,
  input  logic [SLOW_W-1:0] slowdown,
  output logic [N_TAPS-1:0] taps
);

  // Times scaled by 2**SLOW_FRAC so that the arithmetic stays exact.
  localparam longint unsigned PERIOD = longint'(CLK_PERIOD_PS) << SLOW_FRAC;
  localparam longint unsigned HALF   = PERIOD / 2;
  localparam longint unsigned INIT   = longint'(INIT_DELAY_PS);
  localparam longint unsigned ELEM   = longint'(ELEM_DELAY_PS);

  logic [N_TAPS-1:0] line;

  // Phase of the driving clock seen at each element at the sampling edge.
  always_comb begin
    for (int i = 0; i < int'(N_TAPS); i++) begin
      longint unsigned d;
      d = (INIT + 64'(i + 1) * ELEM) * 64'(slowdown);
      line[i] = (d % PERIOD) >= HALF;
    end
  end

  // Sampling chain
  always_ff @(posedge clk) begin
    taps <= line;
  end

endmodule
