// Self-checking test of hamming_weight at its full 128-bit width.
// Drives all-zeros, all-ones, every thermometer code and random words, and
// compares hw one clock edge later with a bit count done here bit by bit.
`timescale 1ns/1ps
module tb_hamming_weight;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] din;
  logic [7:0]   hw;
  int checks = 0, failures = 0;

  hamming_weight dut (.clk, .rst_n, .din, .hw);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) if (v[i] === 1'b1) c++;
    return c;
  endfunction

  task automatic apply_and_check(logic [N-1:0] v);
    din = v;
    @(posedge clk); #0.1;
    checks++;
    if (int'(hw) != ref_count(v)) begin
      failures++;
      $display("FAIL din=%h hw=%0d expected %0d", v, hw, ref_count(v));
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #0.1;
    checks++;
    if (hw != 0) begin failures++; $display("FAIL reset value %0d", hw); end
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    apply_and_check('0);
    apply_and_check('1);
    // thermometer codes as a TDC produces them: k ones from the top
    for (int k = 0; k <= N; k++) begin
      logic [N-1:0] v;
      v = '0;
      for (int i = 0; i < k; i++) v[N-1-i] = 1'b1;
      apply_and_check(v);
    end
    for (int n = 0; n < 300; n++) begin
      apply_and_check({$urandom, $urandom, $urandom, $urandom});
    end
    // latency: a single change is visible after exactly one edge, not before
    @(negedge clk) din = '0;
    @(posedge clk); @(negedge clk) din = '1;
    #0.1 checks++;
    if (hw != 0) begin failures++; $display("FAIL hw changed before the clock edge"); end
    @(posedge clk); #0.1 checks++;
    if (hw != 128) begin failures++; $display("FAIL hw=%0d after one edge", hw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
