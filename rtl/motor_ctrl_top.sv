// motor_ctrl_top: closed-loop speed controller for a small DC motor.
//
// The FPGA drives the motor through a PWM signal switching a MOSFET on an 18 V supply,
// and measures its speed from an optical sensor that sees the 30 slots of a disk on the
// motor shaft. Blocks: user_if reads the switch bank (setpoint, PID enable, test/run),
// input_capture times the slot intervals in 10.24 us ticks and flags stalls and
// overflows, motor_controller converts intervals to RPM and runs the PID loop or the
// step test and chooses the duty, and pwm_gen produces the 8-bit, about 10 kHz PWM.
// The MOSFET, the motor and sensor and the host link are outside the FPGA: pwm_out,
// sensor_in and the log stream are their connections.
//
// Parameters are derived from CLK_HZ so that a slower clock scales the whole design in
// time: the capture tick stays CAP_PRESCALE clocks, RPM_NUM = 2 * CLK_HZ / CAP_PRESCALE,
// the debounce time is 10 ms and the step test holds 0.5 s and 1.5 s.
//
// Ports: clk, rst_n (asynchronous, active low), sw[9:0], sensor_in, pwm_out, duty, rpm
// and rpm_valid, status (stalled, stall_evt, overflow, ovf_evt, pid_saturated,
// test_active, test_stepped, test_done), mode, and the test log stream
// (log_valid/log_ready/log_data, log_dropped).
module motor_ctrl_top #(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned PWM_PRESCALE = 20,
  parameter int unsigned CAP_PRESCALE = 512,
  parameter int unsigned CNT_BITS     = 12,
  parameter int unsigned DEBOUNCE     = CLK_HZ / 100,
  parameter int unsigned RPM_NUM      = 2 * (CLK_HZ / CAP_PRESCALE),
  parameter int unsigned PRE_TICKS    = CLK_HZ / CAP_PRESCALE / 2,
  parameter int unsigned POST_TICKS   = 3 * (CLK_HZ / CAP_PRESCALE) / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [9:0]            sw,
  input  logic                  sensor_in,
  output logic                  pwm_out,
  output logic [7:0]            duty,
  output logic [15:0]           rpm,
  output logic                  rpm_valid,
  output motor_pkg::mode_e      mode,
  output logic                  stalled,
  output logic                  stall_evt,
  output logic                  overflow,
  output logic                  ovf_evt,
  output logic                  pid_saturated,
  output logic                  test_active,
  output logic                  test_stepped,
  output logic                  test_done,
  output logic                  log_valid,
  input  logic                  log_ready,
  output motor_pkg::log_word_t  log_data,
  output logic [7:0]            log_dropped
);

  logic [7:0]          setpoint;
  logic                pid_en, test_mode, mode_changed;
  logic                cap_valid, cap_ready, tick;
  logic [CNT_BITS-1:0] cap_interval;

  user_if #(
    .DEBOUNCE (DEBOUNCE)
  ) u_ui (
    .clk          (clk),
    .rst_n        (rst_n),
    .sw           (sw),
    .setpoint     (setpoint),
    .pid_en       (pid_en),
    .test_mode    (test_mode),
    .mode         (mode),
    .mode_changed (mode_changed)
  );

  input_capture #(
    .PRESCALE (CAP_PRESCALE),
    .CNT_BITS (CNT_BITS)
  ) u_cap (
    .clk          (clk),
    .rst_n        (rst_n),
    .sensor_in    (sensor_in),
    .cap_valid    (cap_valid),
    .cap_ready    (cap_ready),
    .cap_interval (cap_interval),
    .tick         (tick),
    .stalled      (stalled),
    .stall_evt    (stall_evt),
    .ovf_evt      (ovf_evt),
    .overflow     (overflow)
  );

  motor_controller #(
    .CNT_BITS   (CNT_BITS),
    .RPM_NUM    (RPM_NUM),
    .PRE_TICKS  (PRE_TICKS),
    .POST_TICKS (POST_TICKS)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cap_valid     (cap_valid),
    .cap_ready     (cap_ready),
    .cap_interval  (cap_interval),
    .stall_evt     (stall_evt),
    .tick          (tick),
    .setpoint      (setpoint),
    .pid_en        (pid_en),
    .test_mode     (test_mode),
    .mode_changed  (mode_changed),
    .duty          (duty),
    .rpm           (rpm),
    .rpm_valid     (rpm_valid),
    .pid_saturated (pid_saturated),
    .test_active   (test_active),
    .test_stepped  (test_stepped),
    .test_done     (test_done),
    .log_valid     (log_valid),
    .log_ready     (log_ready),
    .log_data      (log_data),
    .log_dropped   (log_dropped)
  );

  pwm_gen #(
    .PRESCALE (PWM_PRESCALE),
    .BITS     (motor_pkg::PWM_BITS)
  ) u_pwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .duty         (duty),
    .pwm          (pwm_out),
    .period_start ()
  );

endmodule
