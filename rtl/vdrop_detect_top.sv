// Voltage-drop attack detection system with its attack-test harness.
//
// Two independent clock domains share one die and one power network:
//  * 550 MHz (clk_atk): the attack control unit, which enables a chosen number
//    of ERO nodes in the two halves of the attack circuit for a chosen number
//    of cycles. The ERO oscillators themselves are not logic; their enables
//    leave the top on ero_en_a / ero_en_b.
//  * 200 MHz (clk_det): N_SENSORS identical detection modules (TDC, Hamming
//    weight, running variance, threshold), each placed somewhere else on the
//    die and each raising its own attack_detected signal.
// The only coupling between the domains is physical: the supply droop the
// attack causes at each sensor. It enters here as slowdown[s], the factor by
// which the gates at sensor s are slowed (2**14 = nominal), which drives that
// sensor's TDC model.
// No signal crosses between the two clocks inside the top.
//
// Timing: see attack_control_unit (enables one edge after start) and
// detection_module (flag four detection-clock edges after the TDC sample).
// Three sensors and the 34-node, 550 MHz / 200 MHz setup follow the reference
// design; bringing the supply in as a per-sensor slowdown factor is this
// design's modelling choice.
module vdrop_detect_top #(
  parameter int unsigned N_SENSORS = 3,
  parameter int unsigned N_NODES   = vdd_pkg::N_NODES,
  localparam int unsigned N_HALF   = N_NODES / 2,
  localparam int unsigned NODE_W   = $clog2(N_NODES + 1),
  localparam int unsigned DUR_W    = vdd_pkg::DUR_W,
  localparam int unsigned SLOW_W   = vdd_pkg::SLOW_W,
  localparam int unsigned HW_W     = vdd_pkg::HW_W,
  localparam int unsigned VAR_W    = vdd_pkg::VAR_W
) (
  // 550 MHz attacker side
  input  logic                 clk_atk,
  input  logic                 rst_atk_n,
  input  logic                 atk_start,
  input  logic [NODE_W-1:0]    atk_n_nodes,
  input  logic [DUR_W-1:0]     atk_duration,
  output logic                 atk_busy,
  output logic [N_HALF-1:0]    ero_en_a,
  output logic [N_HALF-1:0]    ero_en_b,
  // 200 MHz detection side
  input  logic                 clk_det,
  input  logic                 rst_det_n,
  input  logic [SLOW_W-1:0]    slowdown        [N_SENSORS],
  output logic [HW_W-1:0]      hw              [N_SENSORS],
  output logic [VAR_W-1:0]     variance        [N_SENSORS],
  output logic [N_SENSORS-1:0] var_valid,
  output logic [N_SENSORS-1:0] attack_detected
);

  attack_control_unit #(
    .N_NODES  (N_NODES),
    .DUR_W    (DUR_W)
  ) u_acu (
    .clk      (clk_atk),
    .rst_n    (rst_atk_n),
    .start    (atk_start),
    .n_nodes  (atk_n_nodes),
    .duration (atk_duration),
    .busy     (atk_busy),
    .en_a     (ero_en_a),
    .en_b     (ero_en_b)
  );

  for (genvar s = 0; s < int'(N_SENSORS); s++) begin : g_sensor
    detection_module u_det (
      .clk             (clk_det),
      .rst_n           (rst_det_n),
      .slowdown        (slowdown[s]),
      .hw              (hw[s]),
      .variance        (variance[s]),
      .var_valid       (var_valid[s]),
      .attack_detected (attack_detected[s])
    );
  end

endmodule
