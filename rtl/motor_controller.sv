// motor_controller: the control work of the speed controller, done in hardware.
//
// Captured slot intervals are turned into RPM by speed_calc. A stall (no slot edge for
// the whole range of the interval counter) counts as a sample of 0 rpm, so the loop still
// acts when the motor stands still. Every sample updates the rpm output and, when the PID
// loop is on, runs one PID step: the controller executes at each slot edge rather than
// at a fixed rate. The operating mode decides where the PWM duty comes from:
//   run,  PID off : duty = switch setpoint
//   run,  PID on  : PID output tracking setpoint * RPM_PER_STEP rpm
//   test, PID off : duty = level of the step test (0, then the switch setpoint)
//   test, PID on  : PID output tracking the step test's level * RPM_PER_STEP rpm
// Entering test mode, or toggling the PID switch while in test mode, starts a new step
// test; any mode change clears the PID state. The step test's speed records leave on the
// log stream (towards the host link).
//
// The mode table and the per-edge execution follow the original design; that this is hardware
// rather than processor software, the stall-as-zero-speed sample and the scale of
// 8 rpm per switch step are choices made here.
//
// Ports: cap_* (valid-ready interval input from input_capture), stall_evt, tick, the
// user_if outputs, duty, rpm/rpm_valid, pid_saturated, test_active, test_stepped,
// test_done, log_valid/log_ready/log_data, log_dropped. The new duty follows a captured
// interval after NUM_BITS + 4 clocks (22 by default).
module motor_controller #(
  parameter int unsigned CNT_BITS   = 12,
  parameter int unsigned RPM_NUM    = 195312,
  parameter int unsigned PRE_TICKS  = 48_828,
  parameter int unsigned POST_TICKS = 146_484,
  parameter int unsigned KP         = 28672,
  parameter int unsigned KI         = 410,
  parameter int unsigned KD         = 41
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cap_valid,
  output logic                  cap_ready,
  input  logic [CNT_BITS-1:0]   cap_interval,
  input  logic                  stall_evt,
  input  logic                  tick,
  input  logic [7:0]            setpoint,
  input  logic                  pid_en,
  input  logic                  test_mode,
  input  logic                  mode_changed,
  output logic [7:0]            duty,
  output logic [15:0]           rpm,
  output logic                  rpm_valid,
  output logic                  pid_saturated,
  output logic                  test_active,
  output logic                  test_stepped,
  output logic                  test_done,
  output logic                  log_valid,
  input  logic                  log_ready,
  output motor_pkg::log_word_t  log_data,
  output logic [7:0]            log_dropped
);

  logic        spd_valid;
  logic [15:0] spd_rpm;
  logic        stall_pend_q;
  logic        samp_valid;
  logic [15:0] samp_rpm;
  logic [7:0]  level, test_level;
  logic [15:0] target_rpm;
  logic [7:0]  pid_duty;
  logic        test_start;

  speed_calc #(
    .CNT_BITS (CNT_BITS),
    .RPM_NUM  (RPM_NUM),
    .RPM_BITS (16)
  ) u_speed (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cap_valid),
    .in_ready  (cap_ready),
    .interval  (cap_interval),
    .out_valid (spd_valid),
    .out_ready (1'b1),
    .rpm       (spd_rpm)
  );

  // Merge measured speeds and stall events into one sample stream; a stall that meets
  // a division result waits one clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stall_pend_q <= 1'b0;
    else        stall_pend_q <= (stall_evt || stall_pend_q) && spd_valid;
  end
  assign samp_valid = spd_valid || stall_evt || stall_pend_q;
  assign samp_rpm   = spd_valid ? spd_rpm : 16'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rpm       <= '0;
      rpm_valid <= 1'b0;
    end else begin
      rpm_valid <= samp_valid;
      if (samp_valid) rpm <= samp_rpm;
    end
  end

  assign test_start = mode_changed && test_mode;

  step_test #(
    .PRE_TICKS  (PRE_TICKS),
    .POST_TICKS (POST_TICKS)
  ) u_test (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (test_start),
    .closed_loop  (pid_en),
    .level        (setpoint),
    .tick         (tick),
    .sample_valid (samp_valid),
    .sample_rpm   (samp_rpm),
    .level_out    (test_level),
    .active       (test_active),
    .stepped      (test_stepped),
    .done         (test_done),
    .log_valid    (log_valid),
    .log_ready    (log_ready),
    .log_data     (log_data),
    .dropped      (log_dropped)
  );

  assign level      = test_mode ? test_level : setpoint;
  assign target_rpm = 16'(level) * 16'(motor_pkg::RPM_PER_STEP);

  pid_ctrl #(
    .KP (KP),
    .KI (KI),
    .KD (KD)
  ) u_pid (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (pid_en && !mode_changed),
    .sample_valid (samp_valid),
    .measured     (samp_rpm),
    .setpoint     (target_rpm),
    .duty         (pid_duty),
    .duty_valid   (),
    .saturated    (pid_saturated)
  );

  assign duty = pid_en ? pid_duty : level;

endmodule
