// Detection threshold on the running variance.
//
// The attack-detection signal is raised for every cycle in which the running
// variance is strictly greater than M. M = 64 sits between the largest
// variance seen from benign switching activity next to the sensor (55) and
// the smallest first variance value seen after an attack starts (73). The
// comparison result is registered once, so attack_detected follows variance
// by one clock edge. Nothing is flagged while var_valid is low.
//
// The value of M and the strict comparison follow the reference design; the
// valid gating and the non-latching flag are this design's choices.
module detection_threshold #(
  parameter int unsigned VAR_W       = vdd_pkg::VAR_W,
  parameter int unsigned THRESHOLD_M = vdd_pkg::THRESHOLD_M
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VAR_W-1:0] variance,
  input  logic             var_valid,
  output logic             attack_detected
);

  always_ff @(posedge clk) begin
    if (!rst_n) attack_detected <= 1'b0;
    else        attack_detected <= var_valid && (variance > VAR_W'(THRESHOLD_M));
  end

endmodule
