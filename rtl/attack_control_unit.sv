// Attack control unit of the attack circuit.
//
// The attack circuit is built from ERO nodes (each node: 20 blocks of 10
// enhanced ring oscillators), split into two halves placed on either side of
// the sensors and the victim. This unit turns a request "enable n nodes for d
// cycles" into the node enable lines of both halves, so that the two halves
// start and stop on the same 550 MHz edge.
//
// On a start pulse while idle, the request is latched and, from the next edge
// on, en_a holds ceil(n/2) and en_b floor(n/2) ones (lowest indices first)
// for exactly `duration` cycles; then both return to zero. A request larger
// than N_NODES is clamped, a duration of 0 does nothing, and a start while
// busy is ignored. The enables come straight from flip-flops.
//
// Interface: start / n_nodes / duration in, busy and the two enable vectors
// out, synchronous active-low reset. Enabling a number of nodes in both halves
// for a number of cycles follows the reference design; the even split, the
// enable order, the clamping and the counter widths are this design's
// choices. The 34 nodes are the largest attack the reference design uses.
module attack_control_unit #(
  parameter int unsigned N_NODES = vdd_pkg::N_NODES,
  parameter int unsigned DUR_W   = vdd_pkg::DUR_W,
  localparam int unsigned N_HALF = N_NODES / 2,
  localparam int unsigned NODE_W = $clog2(N_NODES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NODE_W-1:0] n_nodes,
  input  logic [DUR_W-1:0]  duration,
  output logic              busy,
  output logic [N_HALF-1:0] en_a,
  output logic [N_HALF-1:0] en_b
);

  initial begin
    assert (N_NODES % 2 == 0) else $error("N_NODES must be even (two halves)");
  end

  logic [NODE_W-1:0] n_clamped;
  logic [NODE_W-1:0] n_a, n_b;
  logic [N_HALF-1:0] mask_a, mask_b;
  logic [DUR_W-1:0]  remaining;

  always_comb begin
    n_clamped = (n_nodes > NODE_W'(N_NODES)) ? NODE_W'(N_NODES) : n_nodes;
    n_b       = n_clamped >> 1;
    n_a       = n_clamped - n_b;
    for (int i = 0; i < int'(N_HALF); i++) begin
      mask_a[i] = (NODE_W'(i) < n_a);
      mask_b[i] = (NODE_W'(i) < n_b);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      remaining <= '0;
      en_a      <= '0;
      en_b      <= '0;
    end else if (!busy) begin
      if (start && duration != '0) begin
        busy      <= 1'b1;
        remaining <= duration - 1'b1;
        en_a      <= mask_a;
        en_b      <= mask_b;
      end
    end else if (remaining == '0) begin
      busy <= 1'b0;
      en_a <= '0;
      en_b <= '0;
    end else begin
      remaining <= remaining - 1'b1;
    end
  end

  // The enables are only ever on during an attack.
  assert property (@(posedge clk) disable iff (!rst_n) !busy |-> (en_a == '0 && en_b == '0));

endmodule
