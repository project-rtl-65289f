// tb_motor_ctrl_full: the speed controller at its default parameters (50 MHz clock,
// 10.24 us capture tick, 9.8 kHz PWM, 10 ms debounce) against the motor model at the
// same clock. One complete operation: with the PID on and the switches at 125
// (1000 rpm) the motor is brought up from standstill and must hold 1000 rpm within 2 %
// after 1.5 s of motor time. Also checks the PWM period (5100 clocks) and that the
// start from standstill saturated the PID output and reported a stall.
module tb_motor_ctrl_full;
  import motor_pkg::*;

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
  int          n_stall = 0, n_sat = 0;
  real         acc = 0.0;
  int          nacc = 0;
  longint      cyc = 0, last_rise = 0, period = 0;
  logic        pwm_q = 1'b0;

  motor_ctrl_top dut (.*);

  motor_model #(.CLK_HZ(50.0e6)) plant (
    .clk, .pwm(pwm_out), .glitch, .load, .sensor(sensor_in), .rpm(model_rpm)
  );

  always #10ns clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    pwm_q <= pwm_out;
    if (pwm_out && !pwm_q) begin
      period = cyc - last_rise;
      last_rise = cyc;
    end
    if (stall_evt) n_stall++;
    if (pid_saturated) n_sat++;
    if (rpm_valid) begin
      acc += real'(rpm);
      nacc++;
    end
  end

  initial begin
    #3s;
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

  initial begin
    real r;
    sw = '0;
    glitch = 1'b0;
    load = 1.0;
    log_ready = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    #50ms;   // standing still: stalls reported
    check(stalled && n_stall > 0, "no stall while standing still");
    sw = {2'b01, 8'd125};
    #1450ms;
    acc = 0.0;
    nacc = 0;
    #200ms;
    r = (nacc > 0) ? acc / nacc : 0.0;
    $display("speed %0.1f rpm (model %0.1f), PWM period %0d clocks", r, model_rpm, period);
    check(r > 980.0 && r < 1020.0, "speed not held at 1000 rpm");
    check(model_rpm > 980.0 && model_rpm < 1020.0, "motor not at 1000 rpm");
    check(period == 5100, "PWM period must be 255 * 20 clocks");
    check(n_sat > 0, "start from standstill must saturate the PID output");
    check(!stalled && !overflow, "status flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
