// End-to-end test of vdrop_detect_top at its default parameters
// (three sensors, 34 ERO nodes, 128-tap TDCs, T = 4, M = 64).
//
// The test plays the reference experiment: the attack control unit is driven
// at 550 MHz, and supply_model turns the number of enabled ERO nodes into a
// supply droop, which slows each sensor's TDC by its own amount on top of a
// per-sensor baseline (about 14, 65 and 97 taps), noise, an 800 kHz ripple,
// and a resistive step while "benign noise modules" run.
//
// Every detection-clock cycle each sensor's hw, variance and flag are
// compared with a reference computed here from the slowdown values the
// sensor saw. Counted mechanisms, each of which must occur: short attacks
// (20 nodes, 1 cycle) and normal attacks (34 nodes, 100 cycles) detected at
// every sensor, a benign resistive step and a slow drift not flagged, a
// sensor driven to the end of its range (0 or 128 taps), and a start request
// ignored while an attack runs. The attack-to-alarm delay at sensor 1 must lie within 20 to 30 ns.
`timescale 1ps/1ps
module tb_vdrop_detect_top;
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

  vdrop_detect_top dut (.*);

  int checks = 0, failures = 0;

  // 550 MHz, offset so that its edges never meet the 200 MHz edges
  initial begin #301; forever #909 clk_atk = ~clk_atk; end
  always #2500 clk_det = ~clk_det;

  initial begin
    #20_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- power network
  real resist = 0.0;            // benign resistive shift
  real drift = 0.0;             // slow supply drift
  supply_model #(.NS(NS), .NH(NH)) u_supply (.clk_atk, .ero_en_a, .ero_en_b, .resist, .drift, .slowdown);

  // ---------------------------------------------------------------- reference
  function automatic int ref_hw(int s);
    int c = 0;
    for (int i = 0; i < 128; i++) begin
      longint d = (longint'(1860) + longint'(10 * (i + 1))) * longint'(s);
      if ((d % (longint'(5000) << 14)) >= (longint'(2500) << 14)) c++;
    end
    return c;
  endfunction

  int hw_hist [NS][$];          // reference weight of the TDC sample at each edge
  int n_edges = 0;
  logic [NS-1:0] det_q = '0;
  int alarms [NS];
  int saturated = 0;
  bit armed = 0;                // an attack was launched, alarm expected
  bit timed = 0;                // a reference attack: its delay at sensor 1 is checked
  realtime t_attack;
  int detected_this [NS];
  realtime dmin = 1e12, dmax = 0;

  function automatic int ref_var(int s, int last);
    longint sx = 0, sxx = 0;
    for (int k = last - 3; k <= last; k++) begin
      sx += hw_hist[s][k]; sxx += hw_hist[s][k] * hw_hist[s][k];
    end
    return int'((4 * sxx - sx * sx) / 16);
  endfunction

  always @(posedge clk_det) begin
    for (int s = 0; s < NS; s++) hw_hist[s].push_back(ref_hw(int'(slowdown[s])));
    n_edges++;
    #100;
    if (rst_det_n && n_edges > 12) begin
      automatic int n = n_edges - 1;
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (int'(hw[s]) != hw_hist[s][n - 1]) begin
          failures++; $display("FAIL s%0d edge %0d hw=%0d expected %0d", s, n, hw[s], hw_hist[s][n - 1]);
        end
        checks++;
        if (!var_valid[s] || int'(variance[s]) != ref_var(s, n - 3)) begin
          failures++; $display("FAIL s%0d edge %0d var=%0d expected %0d", s, n, variance[s], ref_var(s, n - 3));
        end
        checks++;
        if (attack_detected[s] != (ref_var(s, n - 4) > 64)) begin
          failures++; $display("FAIL s%0d edge %0d flag=%0b", s, n, attack_detected[s]);
        end
        if (hw[s] == 0 || hw[s] == 128) saturated++;
        if (attack_detected[s] && !det_q[s]) begin
          alarms[s]++;
          if (armed && timed && s == 1 && detected_this[s] == 0) begin
            automatic realtime d = $realtime - t_attack;
            if (d < dmin) dmin = d;
            if (d > dmax) dmax = d;
          end
          detected_this[s]++;
        end
      end
      det_q = attack_detected;
    end
  end

  // ---------------------------------------------------------------- scenario
  int short_ok = 0, normal_ok = 0, ignored_ok = 0;
  int sweep_detected = 0, sweep_total = 0;

  task automatic wait_det(int cycles);
    repeat (cycles) @(posedge clk_det);
  endtask

  // one attack; returns how many sensors raised an alarm
  task automatic attack(int nodes, int cycles, output int n_sensors, input bit poke = 0);
    for (int s = 0; s < NS; s++) detected_this[s] = 0;
    @(negedge clk_atk);
    atk_start = 1; atk_n_nodes = 6'(nodes); atk_duration = 16'(cycles);
    @(negedge clk_atk);
    atk_start = 0;
    t_attack = $realtime - 909;      // enables rose at the previous posedge
    armed = 1;
    if (poke) begin
      @(negedge clk_atk);
      atk_start = 1; atk_n_nodes = 6'd2; atk_duration = 16'd1000;
      @(negedge clk_atk);
      atk_start = 0;
    end
    wait_det(cycles / 2 + 40);
    armed = 0;
    n_sensors = 0;
    for (int s = 0; s < NS; s++) if (detected_this[s] > 0) n_sensors++;
    wait_det(60);                    // let the ringing settle
  endtask

  task automatic expect_no_alarm(string what, int a0, int a1, int a2);
    checks++;
    if (alarms[0] != a0 || alarms[1] != a1 || alarms[2] != a2) begin
      failures++; $display("FAIL %s raised an alarm", what);
    end
  endtask

  initial begin
    int got;
    int a0, a1, a2;
    wait_det(4);
    rst_det_n = 1;
    @(negedge clk_atk) rst_atk_n = 1;
    wait_det(300);                   // quiet: noise and ripple only
    expect_no_alarm("quiet supply", 0, 0, 0);

    // benign neighbours switching on and off: resistive shift
    a0 = alarms[0]; a1 = alarms[1]; a2 = alarms[2];
    for (int k = 0; k < 4; k++) begin
      resist = 280.0; wait_det(150);
      resist = 0.0;   wait_det(150);
    end
    expect_no_alarm("resistive step", a0, a1, a2);

    // slow drop over 200 cycles and slow recovery
    for (int k = 0; k < 200; k++) begin drift = 10.0 * k; wait_det(1); end
    for (int k = 200; k >= 0; k--) begin drift = 10.0 * k; wait_det(1); end
    expect_no_alarm("slow drift", a0, a1, a2);

    // reference short attacks
    timed = 1;
    for (int k = 0; k < 8; k++) begin
      attack(20, 1, got);
      checks++;
      if (got == NS) short_ok++;
      else begin failures++; $display("FAIL short attack %0d seen by %0d sensors", k, got); end
      wait_det($urandom_range(0, 7));
    end
    // reference normal attacks, one with a start request while busy
    for (int k = 0; k < 3; k++) begin
      attack(34, 100, got, k == 1);
      checks++;
      if (got == NS) normal_ok++;
      else begin failures++; $display("FAIL normal attack %0d seen by %0d sensors", k, got); end
    end
    checks++;
    // the poked request (2 nodes, 1000 cycles) must not have started
    if (!atk_busy) ignored_ok++;
    else begin failures++; $display("FAIL start accepted while busy"); end

    timed = 0;
    // part of the characterisation sweep: 10..30 nodes, 1..5 cycles (reported only)
    for (int nodes = 10; nodes <= 30; nodes += 10)
      for (int d = 1; d <= 5; d += 2) begin
        attack(nodes, d, got);
        sweep_total++;
        if (got == NS) sweep_detected++;
      end

    checks++;
    if (short_ok == 0)  begin failures++; $display("FAIL no short attack detected"); end
    checks++;
    if (normal_ok == 0) begin failures++; $display("FAIL no normal attack detected"); end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL no sensor reached the end of its range"); end
    // pipeline of 4 detection cycles (20 ns), up to one sampling period of
    // phase, and the time the droop takes to build up in the model
    checks++;
    if (dmax > 30_000.0 || dmin < 20_000.0) begin
      failures++; $display("FAIL attack-to-alarm delay outside 20..30 ns");
    end
    checks++;
    if (ignored_ok == 0) begin failures++; $display("FAIL busy start never exercised"); end
    $display("short attacks detected at all sensors: %0d/8, normal: %0d/3", short_ok, normal_ok);
    $display("sweep attacks detected at all sensors: %0d/%0d", sweep_detected, sweep_total);
    $display("saturated samples: %0d, alarms per sensor: %0d %0d %0d", saturated, alarms[0], alarms[1], alarms[2]);
    $display("reference attack start to alarm at sensor 1: %0.1f .. %0.1f ns", dmin / 1000.0, dmax / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
