// tb_setpoint_range: closed-loop operation across the speed range. The design runs
// with time scaled by 64 (CLK_HZ = 781250, capture prescaler 8, PWM prescaler 1) against
// the motor model, in run mode with the PID on. For each switch setting the loop must
// hold the setpoint within 3 % (at least one PWM step, 7.8 rpm), averaged over 0.5 s
// after 3 s of settling (10 s at the bottom of the range, where the loop runs only
// about 30 times per second and stalls feed it zero-speed samples):
// 64 rpm (code 8, near the 60 rpm bottom, 33 ms slot intervals), 504, 1000, 1504 and
// 1800 rpm (the model reaches about 1815 rpm at full duty, so 2000 rpm is not tried).
module tb_setpoint_range;
  import motor_pkg::*;
  localparam real CLK_R = 781250.0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [9:0]  sw;
  logic        sensor_in, pwm_out;
  logic [7:0]  duty, log_dropped;
  logic [15:0] rpm;
  logic        rpm_valid, stalled, stall_evt, overflow, ovf_evt, pid_saturated;
  logic        test_active, test_stepped, test_done, log_valid;
  logic        log_ready = 1'b1;
  mode_e       mode;
  log_word_t   log_data;
  logic        glitch = 1'b0;
  real         load = 1.0;
  real         model_rpm;
  int          checks = 0, failures = 0;
  real         acc = 0.0;
  int          nacc = 0;

  motor_ctrl_top #(.CLK_HZ(781_250), .PWM_PRESCALE(1), .CAP_PRESCALE(8)) dut (.*);
  motor_model #(.CLK_HZ(CLK_R)) plant (
    .clk, .pwm(pwm_out), .glitch, .load, .sensor(sensor_in), .rpm(model_rpm)
  );

  always #640ns clk = ~clk;
  always @(posedge clk) if (rpm_valid) begin
    acc += real'(rpm);
    nacc++;
  end

  initial begin
    #60s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hold(input logic [7:0] code, input real settle_s);
    real r, target, tol;
    target = real'(code) * 8.0;
    // 3 %, but at least one PWM step: 18 V / 255 * 110 rpm/V = 7.8 rpm
    tol = (0.03 * target > 8.0) ? 0.03 * target : 8.0;
    sw = {2'b01, code};
    repeat (int'(settle_s * CLK_R)) @(posedge clk);
    acc = 0.0;
    nacc = 0;
    repeat (int'(0.5 * CLK_R)) @(posedge clk);
    r = (nacc > 0) ? acc / nacc : 0.0;
    $display("setpoint %0.0f rpm: measured %0.1f rpm, model %0.1f rpm, duty %0d", target, r, model_rpm, duty);
    checks++;
    if (!(r > target - tol && r < target + tol)) begin
      failures++;
      $display("FAIL: setpoint %0.0f not held", target);
    end
    checks++;
    if (!(model_rpm > target - tol && model_rpm < target + tol)) begin
      failures++;
      $display("FAIL: motor not at %0.0f rpm", target);
    end
  endtask

  initial begin
    sw = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    hold(8'd8, 10.0);
    hold(8'd63, 3.0);
    hold(8'd125, 3.0);
    hold(8'd188, 3.0);
    hold(8'd225, 3.0);
    hold(8'd8, 10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
