// tb_motor_ctrl_top: end-to-end test of the speed controller against the motor model.
//
// The design runs with every time constant scaled by 64: CLK_HZ = 781250 with a
// capture prescaler of 8 keeps the 195312 / n speed formula, the 10 ms debounce and the
// 0.5 s / 1.5 s step-test phases, and the model is told the same clock rate, so each
// simulated clock is 1.28 us of plant time. The PWM prescaler is 1 (255-clock period).
// Scenarios, each entered through the switch bank:
//   1 run, PID off, 70 % duty: the measured speed matches the model and the expected
//     110 rpm/V * (0.7 * 18 V - 1.5 V) steady state;
//   2 duty inside the deadband: the motor stops and a stall is reported;
//   3 run, PID on, 1000 rpm: the loop starts from standstill (output saturated) and
//     settles within 2 %;
//   4 noise pulses on the sensor: captures arrive faster than they are consumed and the
//     overflow is reported;
//   5 test, PID off: open-loop step 0 -> 70 % with the log stream throttled (drops);
//   6 test, PID on, switch 162: closed-loop step 648 -> 1296 rpm, the log records rise,
//     reach 10 % of the step within 1 s and end within 2 %.
// Each mechanism is counted; one that never happened is a failure.
module tb_motor_ctrl_top;
  import motor_pkg::*;
  localparam int unsigned CLK   = 781_250;
  localparam real         CLK_R = 781250.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [9:0]  sw;
  logic        sensor_in, pwm_out;
  logic [7:0]  duty, log_dropped;
  logic [15:0] rpm;
  logic        rpm_valid, stalled, stall_evt, overflow, ovf_evt, pid_saturated;
  logic        test_active, test_stepped, test_done, log_valid, log_ready;
  mode_e       mode;
  log_word_t   log_data;
  logic        glitch;
  real         load, model_rpm;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_stall = 0, n_ovf = 0, n_sat = 0, n_log = 0, n_samples = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int last_ts = 0;
  bit ts_ok = 1'b1;

  motor_ctrl_top #(
    .CLK_HZ       (CLK),
    .PWM_PRESCALE (1),
    .CAP_PRESCALE (8)
  ) dut (.*);

  motor_model #(.CLK_HZ(CLK_R)) plant (
    .clk, .pwm(pwm_out), .glitch, .load, .sensor(sensor_in), .rpm(model_rpm)
  );

  always #640ns clk = ~clk;

  // running average of the reported speed
  real acc = 0.0;
  int  nacc = 0;
  logic pid_sat_q = 1'b0;
  always @(posedge clk) begin
    if (stall_evt) n_stall++;
    if (ovf_evt) n_ovf++;
    pid_sat_q <= pid_saturated;
    if (pid_saturated && !pid_sat_q) n_sat++;
    if (rpm_valid) begin
      n_samples++;
      acc += real'(rpm);
      nacc++;
    end
    if (log_valid && log_ready) begin
      n_log++;
      if (int'(log_data.time_stamp) < last_ts) ts_ok = 1'b0;
      last_ts = int'(log_data.time_stamp);
    end
  end

  initial begin
    #60s;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_s(input real s);
    repeat (int'(s * CLK_R)) @(posedge clk);
  endtask

  // Average of the reported speed over the next s seconds (0 if no samples).
  task automatic avg_rpm(input real s, output real r);
    acc = 0.0;
    nacc = 0;
    wait_s(s);
    r = (nacc > 0) ? acc / nacc : 0.0;
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a > b * (1.0 - tol)) && (a < b * (1.0 + tol));
  endfunction

  task automatic set_switches(input logic [9:0] v);
    sw = v;
    wait_s(0.02);   // past the 10 ms debounce
    n_mode[int'(mode)]++;
    check(mode == mode_e'(v[9:8]), "mode not taken");
  endtask

  initial begin
    real r, expect_ss, mr;
    int  t_settle, step_logs;
    sw = '0;
    glitch = 1'b0;
    load = 1.0;
    log_ready = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1: open loop, 70 %
    set_switches({2'b00, 8'd179});
    wait_s(1.0);
    avg_rpm(0.2, r);
    mr = model_rpm;
    expect_ss = 110.0 * (18.0 * 179.0 / 255.0 - 1.5);
    $display("open loop: reported %0.1f rpm, model %0.1f rpm, expected %0.1f", r, mr, expect_ss);
    check(near(r, mr, 0.02), "reported speed does not match the motor");
    check(near(mr, expect_ss, 0.03), "open-loop steady state");

    // 2: inside the deadband -> stall
    set_switches({2'b00, 8'd10});
    wait_s(1.0);
    check(stalled && rpm == 16'd0, "no stall reported with the motor stopped");
    check(model_rpm < 1.0, "motor should stand still");

    // 3: closed loop to 1000 rpm from standstill
    set_switches({2'b01, 8'd125});
    wait_s(2.5);
    avg_rpm(0.5, r);
    $display("closed loop 1000 rpm: reported %0.1f, model %0.1f", r, model_rpm);
    check(near(r, 1000.0, 0.02), "closed loop does not reach 1000 rpm");

    // 4: noise pulses right after slot edges
    for (int i = 0; i < 5; i++) begin
      @(posedge sensor_in);
      repeat (3) @(posedge clk);
      repeat (2) begin   // two extra edges within the divider's busy time
        glitch = 1'b1;
        repeat (2) @(posedge clk);
        glitch = 1'b0;
        repeat (2) @(posedge clk);
      end
      wait_s(0.05);
    end
    check(overflow, "overflow flag not set");
    wait_s(0.5);
    avg_rpm(0.3, r);
    $display("after noise: %0.1f rpm", r);
    check(near(r, 1000.0, 0.02), "loop does not recover after noise");

    // 5: open-loop step test with a throttled log stream
    fork
      begin
        set_switches({2'b10, 8'd179});
      end
      begin
        while (!test_done) begin
          // host busy for 4 ms of every 8 ms
          @(negedge clk) log_ready = 1'b0;
          wait_s(0.004);
          @(negedge clk) log_ready = 1'b1;
          wait_s(0.004);
        end
      end
    join_any
    check(test_active && duty == 8'd0, "open-loop test starts at duty 0");
    wait (test_done);
    @(negedge clk) log_ready = 1'b1;
    check(log_dropped > 0, "throttled log stream dropped nothing");
    check(near(model_rpm, expect_ss, 0.03), "open-loop test final speed");

    // 6: closed-loop step test 648 -> 1296 rpm
    n_log = 0;
    last_ts = 0;
    set_switches({2'b11, 8'd162});
    wait (test_stepped);
    step_logs = n_log;
    check(step_logs > 50, "no records before the step");
    t_settle = 0;
    while (!near(real'(rpm), 1296.0, 0.05) && t_settle < int'(1.2 * CLK_R)) begin
      @(posedge clk);
      t_settle++;
    end
    $display("closed-loop step: within 5 %% of 1296 rpm after %0.3f s", real'(t_settle) / CLK_R);
    check(real'(t_settle) / CLK_R < 1.0, "step response too slow");
    wait (test_done);
    avg_rpm(0.3, r);
    $display("closed-loop step end: %0.1f rpm", r);
    check(near(r, 1296.0, 0.02), "closed-loop step final speed");
    check(n_log > step_logs + 100, "no records after the step");
    check(ts_ok, "record time stamps must not go back");

    $display("mechanisms: modes %0d/%0d/%0d/%0d stall %0d overflow %0d pid-saturation %0d records %0d samples %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_stall, n_ovf, n_sat, n_log, n_samples);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d never used", m));
    check(n_stall > 0, "stall never happened");
    check(n_ovf > 0, "overflow never happened");
    check(n_sat > 0, "PID saturation never happened");
    check(n_log > 0, "no test records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
