// Hamming weight of a TDC sample.
//
// The sampling chain of the TDC is a thermometer-like code whose edge moves
// with the supply voltage. Counting its ones reduces the 128-bit word to an
// 8-bit value that the variance stage can work on. The count is a plain sum of
// all input bits (an adder tree after synthesis) followed by one output
// register, so hw reflects the din presented one clock edge earlier.
//
// Interface: din (N_IN bits) in, hw (W_OUT bits) out, synchronous active-low
// reset clearing hw. Counting all 128 bits and the 8-bit result follow the
// reference design; the single output register and the reset are this
// design's choices.
module hamming_weight #(
  parameter int unsigned N_IN  = vdd_pkg::N_TAPS,
  parameter int unsigned W_OUT = vdd_pkg::HW_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   din,
  output logic [W_OUT-1:0]  hw
);

  initial begin
    assert (2**W_OUT > N_IN) else $error("W_OUT too narrow for N_IN");
  end

  logic [W_OUT-1:0] count;

  always_comb begin
    count = '0;
    for (int i = 0; i < int'(N_IN); i++) begin
      count = count + W_OUT'(din[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) hw <= '0;
    else        hw <= count;
  end

endmodule
