// Self-checking test of attack_control_unit (34 ERO nodes, two halves of 17).
// Launches the two reference attacks (20 nodes for 1 cycle, 34 nodes for 100
// cycles) and other requests, and checks for each: the enables rise on the
// edge after start, stay on for exactly the requested number of cycles, hold
// ceil(n/2) and floor(n/2) ones from index 0 up, and a start while busy is
// ignored.
`timescale 1ps/1ps
module tb_attack_control_unit;
  localparam int N_NODES = 34, HALF = 17;
  logic clk = 0, rst_n = 0;
  logic        start;
  logic [5:0]  n_nodes;
  logic [15:0] duration;
  logic        busy;
  logic [HALF-1:0] en_a, en_b;
  int checks = 0, failures = 0;

  attack_control_unit dut (.clk, .rst_n, .start, .n_nodes, .duration, .busy, .en_a, .en_b);

  always #909 clk = ~clk;   // 550 MHz

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [HALF-1:0] low_ones(int k);
    logic [HALF-1:0] m = '0;
    for (int i = 0; i < k && i < HALF; i++) m[i] = 1'b1;
    return m;
  endfunction

  task automatic attack(int n, int d, bit poke_while_busy);
    int on_cycles = 0, k, na, nb;
    k  = n > N_NODES ? N_NODES : n;
    na = (k + 1) / 2;
    nb = k / 2;
    @(negedge clk);
    start = 1; n_nodes = 6'(n); duration = 16'(d);
    @(negedge clk);
    start = 0;
    // from here the enables must hold for d cycles (checked at each negedge)
    for (int c = 0; c < d + 3; c++) begin
      if (c == 2 && poke_while_busy) begin start = 1; n_nodes = 6'd2; duration = 16'd500; end
      else start = 0;
      if (en_a != '0 || en_b != '0) begin
        on_cycles++;
        checks++;
        if (en_a != low_ones(na) || en_b != low_ones(nb) || !busy) begin
          failures++;
          $display("FAIL n=%0d en_a=%b en_b=%b", n, en_a, en_b);
        end
      end else if (c < d && k > 0) begin
        checks++; failures++;
        $display("FAIL n=%0d d=%0d enables off at cycle %0d", n, d, c);
      end
      @(negedge clk);
    end
    start = 0;
    checks++;
    if ((k > 0 ? on_cycles : d) != d) begin
      failures++;
      $display("FAIL n=%0d active %0d cycles, expected %0d", n, on_cycles, d);
    end
    checks++;
    if (busy || en_a != '0 || en_b != '0) begin
      failures++; $display("FAIL still busy after n=%0d d=%0d", n, d);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    start = 0; n_nodes = 0; duration = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (busy || en_a != 0 || en_b != 0) begin failures++; $display("FAIL after reset"); end
    attack(20, 1, 0);     // short attack
    attack(34, 100, 0);   // normal attack
    for (int n = 10; n <= 30; n += 5)
      for (int d = 1; d <= 5; d++) attack(n, d, 0);  // fault characterisation sweep
    attack(7, 3, 0);
    attack(63, 2, 0);     // clamped to 34
    attack(12, 20, 1);    // start during the attack is ignored
    // duration 0 starts nothing
    @(negedge clk) start = 1; n_nodes = 6'd20; duration = 16'd0;
    @(negedge clk) start = 0;
    checks++;
    if (busy || en_a != 0) begin failures++; $display("FAIL zero-length attack started"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
