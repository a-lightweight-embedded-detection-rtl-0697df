// Attack campaign on vdrop_detect_top at default parameters, scaled down in
// count and spacing from the hardware evaluation so that it simulates in
// seconds. It runs, against supply_model:
//  * 50 switch-on/switch-off cycles of benign neighbouring logic (a resistive
//    step each time): the largest variance seen must stay at or below M, and
//    no alarm may be raised;
//  * 400 reference short attacks (20 nodes, 1 cycle) and 400 reference normal
//    attacks (34 nodes, 100 cycles), 150 detection cycles apart instead of
//    one million 550 MHz cycles: every attack must be flagged at all three
//    sensors;
//  * for the short attacks, the delay from attack start to the alarm at
//    sensor 1 in 550 MHz cycles, and the first variance value at or above M
//    there; the delay must stay within 11 to 17 cycles (20 to 30 ns);
//  * the fault-characterisation grid, 10 to 30 nodes by 1 to 5 cycles,
//    20 attempts each: detection rates are printed, not checked.
`timescale 1ps/1ps
module tb_attack_campaign;
  localparam int NS = 3;
  localparam int NH = 17;

  logic clk_atk = 0, clk_det = 0;
  logic rst_atk_n = 0, rst_det_n = 0;
  logic        atk_start = 0;
  logic [5:0]  atk_n_nodes = 0;
  logic [15:0] atk_duration = 0;
  logic        atk_busy;
  logic [NH-1:0] ero_en_a, ero_en_b;
  logic [15:0] slowdown [NS];
  logic [7:0]  hw       [NS];
  logic [15:0] variance [NS];
  logic [NS-1:0] var_valid, attack_detected;
  real resist = 0.0, drift = 0.0;

  vdrop_detect_top dut (.*);
  supply_model #(.NS(NS), .NH(NH)) u_supply (.clk_atk, .ero_en_a, .ero_en_b, .resist, .drift, .slowdown);

  int checks = 0, failures = 0;

  initial begin #301; forever #909 clk_atk = ~clk_atk; end
  always #2500 clk_det = ~clk_det;

  initial begin
    #100_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-attack observation
  bit      armed = 0;
  realtime t_attack;
  int      seen [NS];
  int      first_var1;
  realtime delay1;
  int      max_var = 0;           // largest variance, any sensor, while watched
  int      false_alarms = 0;
  bit      watch_noise = 0;

  always @(posedge clk_det) begin
    #100;
    for (int s = 0; s < NS; s++) begin
      if (watch_noise && var_valid[s] && int'(variance[s]) > max_var) max_var = variance[s];
      if (watch_noise && attack_detected[s]) false_alarms++;
      if (armed && attack_detected[s] && seen[s] == 0) begin
        seen[s] = 1;
        if (s == 1) begin
          delay1 = $realtime - t_attack;
          first_var1 = variance[1];
        end
      end
    end
  end

  task automatic wait_det(int cycles);
    repeat (cycles) @(posedge clk_det);
  endtask

  task automatic attack(int nodes, int cycles, output int n_sensors);
    for (int s = 0; s < NS; s++) seen[s] = 0;
    @(negedge clk_atk);
    atk_start = 1; atk_n_nodes = 6'(nodes); atk_duration = 16'(cycles);
    @(negedge clk_atk);
    atk_start = 0;
    t_attack = $realtime - 909;
    armed = 1;
    wait_det(cycles / 2 + 40);
    armed = 0;
    n_sensors = seen[0] + seen[1] + seen[2];
    wait_det(110 + $urandom_range(0, 7));
  endtask

  int delay_hist [int];
  int got;

  initial begin
    wait_det(4);
    rst_det_n = 1;
    @(negedge clk_atk) rst_atk_n = 1;
    wait_det(100);

    // benign activity next to the sensors
    watch_noise = 1;
    for (int k = 0; k < 50; k++) begin
      resist = 250.0 + real'($urandom_range(0, 60));
      wait_det(100 + $urandom_range(0, 50));
      resist = 0.0;
      wait_det(100 + $urandom_range(0, 50));
    end
    watch_noise = 0;
    checks++;
    if (false_alarms != 0 || max_var > 64) begin
      failures++; $display("FAIL benign activity: %0d alarms, max variance %0d", false_alarms, max_var);
    end
    $display("benign activity, 50 activations: max variance %0d, alarms %0d", max_var, false_alarms);

    // reference short attacks
    begin
      int ok = 0, vmin = 1 << 30, vmax = 0;
      for (int k = 0; k < 400; k++) begin
        int cyc;
        attack(20, 1, got);
        checks++;
        if (got == NS) ok++;
        else begin failures++; $display("FAIL short attack %0d seen by %0d sensors", k, got); end
        if (seen[1]) begin
          cyc = int'(delay1 / 1818.0 + 0.999);     // 550 MHz cycles, rounded up
          delay_hist[cyc]++;
          checks++;
          if (cyc < 11 || cyc > 17) begin failures++; $display("FAIL short attack delay %0d cycles", cyc); end
          if (first_var1 < vmin) vmin = first_var1;
          if (first_var1 > vmax) vmax = first_var1;
        end
      end
      $display("short attacks flagged at all sensors: %0d/400", ok);
      $display("first variance above M at sensor 1: %0d .. %0d", vmin, vmax);
      foreach (delay_hist[c]) $display("  delay %0d cycles @550 MHz: %0d attacks", c, delay_hist[c]);
    end

    // reference normal attacks
    begin
      int ok = 0;
      for (int k = 0; k < 400; k++) begin
        attack(34, 100, got);
        checks++;
        if (got == NS) ok++;
        else begin failures++; $display("FAIL normal attack %0d seen by %0d sensors", k, got); end
      end
      $display("normal attacks flagged at all sensors: %0d/400", ok);
    end

    // characterisation grid
    for (int nodes = 10; nodes <= 30; nodes += 5) begin
      string line;
      line = $sformatf("grid %2d nodes:", nodes);
      for (int d = 1; d <= 5; d++) begin
        automatic int ok = 0;
        for (int k = 0; k < 20; k++) begin
          attack(nodes, d, got);
          if (got == NS) ok++;
        end
        line = {line, $sformatf("  %0d cyc %3d%%", d, ok * 5)};
      end
      $display("%s", line);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
