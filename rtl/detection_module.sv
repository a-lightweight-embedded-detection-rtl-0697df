// One sensor's voltage-drop detection chain.
//
// TDC sensor -> Hamming weight -> running variance -> threshold, all on the
// 200 MHz detection clock. The chain looks at how fast the sensor value
// moves, not at its level, so the same threshold works wherever the sensor
// sits on the die and whatever its baseline reading is.
//
// Timing, counted from the edge at which the TDC samples its delay line:
// hw follows one edge later, variance three edges later (two pipeline stages)
// and attack_detected four edges later, i.e. 20 ns at 200 MHz.
//
// The block order and the parameters (128 taps, 8-bit weight, T = 4, M = 64)
// follow the reference design; the pipeline depth is this design's choice.
module detection_module #(
  parameter int unsigned N_TAPS        = vdd_pkg::N_TAPS,
  parameter int unsigned LOG2_T        = vdd_pkg::LOG2_T,
  parameter int unsigned VAR_W         = vdd_pkg::VAR_W,
  parameter int unsigned THRESHOLD_M   = vdd_pkg::THRESHOLD_M,
  parameter int unsigned INIT_DELAY_PS = vdd_pkg::INIT_DELAY_PS,
  parameter int unsigned ELEM_DELAY_PS = vdd_pkg::ELEM_DELAY_PS,
  parameter int unsigned CLK_PERIOD_PS = vdd_pkg::DET_CLK_PS,
  localparam int unsigned HW_W         = $clog2(N_TAPS + 1),
  localparam int unsigned SLOW_W       = vdd_pkg::SLOW_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SLOW_W-1:0]  slowdown,
  output logic [HW_W-1:0]    hw,
  output logic [VAR_W-1:0]   variance,
  output logic               var_valid,
  output logic               attack_detected
);

  logic [N_TAPS-1:0] taps;

  tdc_sensor #(
    .N_TAPS        (N_TAPS),
    .CLK_PERIOD_PS (CLK_PERIOD_PS),
    .INIT_DELAY_PS (INIT_DELAY_PS),
    .ELEM_DELAY_PS (ELEM_DELAY_PS)
  ) u_tdc (
    .clk           (clk),
    .slowdown      (slowdown),
    .taps          (taps)
  );

  hamming_weight #(
    .N_IN  (N_TAPS),
    .W_OUT (HW_W)
  ) u_hw (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (taps),
    .hw    (hw)
  );

  running_variance #(
    .W_IN     (HW_W),
    .LOG2_T   (LOG2_T),
    .VAR_W    (VAR_W)
  ) u_var (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample   (hw),
    .variance (variance),
    .valid    (var_valid)
  );

  detection_threshold #(
    .VAR_W           (VAR_W),
    .THRESHOLD_M     (THRESHOLD_M)
  ) u_thr (
    .clk             (clk),
    .rst_n           (rst_n),
    .variance        (variance),
    .var_valid       (var_valid),
    .attack_detected (attack_detected)
  );

endmodule
