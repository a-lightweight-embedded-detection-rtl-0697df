// Running variance of the last T sensor samples.
//
// Every clock cycle a new sample enters a window of T = 2**LOG2_T values. The
// module returns the population variance of that window,
//     var = E(v^2) - E(v)^2 = (T*S2 - S1^2) / T^2,
// with S1 the sum and S2 the sum of squares of the window. Because T is a
// power of two the divisions are shifts; the numerator is exact (it is never
// negative), so the only rounding is the final floor. A ramp of 20 per sample
// gives 500, a ramp of 2 gives 5, as in the reference design's simulation.
//
// Pipeline (all registers on clk):
//   cycle 0: sample arrives; S1, S2 of {sample, last T-1 samples} are
//            registered and sample is pushed into the window
//   cycle 1: variance register loads (T*S2 - S1^2) >> 2*LOG2_T
// so variance reflects the sample presented two edges earlier. valid rises
// once T samples have entered since reset, which hides the step from the
// reset value to the sensor's baseline. The formula, T = 4 and 8-bit samples
// follow the reference design; the two-stage pipeline, the valid flag and
// the 16-bit result are this design's choices.
module running_variance #(
  parameter int unsigned W_IN   = vdd_pkg::HW_W,
  parameter int unsigned LOG2_T = vdd_pkg::LOG2_T,
  parameter int unsigned VAR_W  = vdd_pkg::VAR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W_IN-1:0]  sample,
  output logic [VAR_W-1:0] variance,
  output logic             valid
);

  localparam int unsigned T     = 1 << LOG2_T;
  localparam int unsigned S1_W  = W_IN + LOG2_T;          // sum of T samples
  localparam int unsigned S2_W  = 2 * W_IN + LOG2_T;      // sum of T squares
  localparam int unsigned NUM_W = 2 * W_IN + 2 * LOG2_T;  // T*S2 and S1^2
  localparam int unsigned CNT_W = LOG2_T + 1;

  initial begin
    assert (VAR_W >= 2 * W_IN) else $error("VAR_W narrower than the largest variance");
  end

  // Last T-1 samples; hist[0] is the newest.
  logic [W_IN-1:0]  hist [T-1];
  logic [S1_W-1:0]  s1_q;
  logic [S2_W-1:0]  s2_q;
  logic [CNT_W-1:0] fill_q;     // samples seen since reset, saturates at T
  logic             s_valid_q;  // S1/S2 cover T real samples

  logic [S1_W-1:0]  s1_d;
  logic [S2_W-1:0]  s2_d;

  always_comb begin
    s1_d = S1_W'(sample);
    s2_d = S2_W'(sample) * S2_W'(sample);
    for (int i = 0; i < int'(T) - 1; i++) begin
      s1_d = s1_d + S1_W'(hist[i]);
      s2_d = s2_d + S2_W'(hist[i]) * S2_W'(hist[i]);
    end
  end

  // Stage 1: window and sums
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(T) - 1; i++) hist[i] <= '0;
      s1_q      <= '0;
      s2_q      <= '0;
      fill_q    <= '0;
      s_valid_q <= 1'b0;
    end else begin
      hist[0] <= sample;
      for (int i = 1; i < int'(T) - 1; i++) hist[i] <= hist[i-1];
      s1_q   <= s1_d;
      s2_q   <= s2_d;
      if (fill_q != CNT_W'(T)) fill_q <= fill_q + 1'b1;
      s_valid_q <= (fill_q >= CNT_W'(T - 1));
    end
  end

  // Stage 2: T*S2 - S1^2, divided by T^2
  logic [NUM_W-1:0] t_s2, s1_sq, num;

  always_comb begin
    t_s2  = NUM_W'(s2_q) << LOG2_T;
    s1_sq = NUM_W'(s1_q) * NUM_W'(s1_q);
    num   = t_s2 - s1_sq;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      variance <= '0;
      valid    <= 1'b0;
    end else begin
      variance <= VAR_W'(num >> (2 * LOG2_T));
      valid    <= s_valid_q;
    end
  end

endmodule
