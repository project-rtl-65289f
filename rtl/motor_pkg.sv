// motor_pkg: constants and types shared by the DC-motor speed controller.
//
// The controller runs from a single 50 MHz clock (the DE0 board oscillator). Two clock
// enables are derived from it: a PWM step every 20 clocks, so one 255-step PWM period
// lasts 5100 clocks (about 9.8 kHz, the "approximately 10 kHz" of the original design), and an
// input-capture tick every 512 clocks, which is exactly 10.24 us. With 30 slots on the
// disk one revolution gives 30 intervals, so RPM = 60 / (30 * T) = 2 / T with T in
// seconds; in capture ticks that is RPM = RPM_NUM / n with RPM_NUM = 2 * 50e6 / 512.
// The 50 MHz figure, the 12-bit interval counter and the switch-to-RPM scale are this
// design's choices; the 8-bit PWM, the 10.24 us tick and the 30 slots follow the original design.
package motor_pkg;

  localparam int unsigned PWM_BITS      = 8;
  localparam int unsigned RPM_PER_STEP  = 8;      // switch code 0..255 -> 0..2040 rpm

  // Operating modes selected by the two mode switches.
  typedef enum logic [1:0] {
    MODE_RUN_PWM     = 2'b00,  // run, PID off: switches give the PWM duty
    MODE_RUN_RPM     = 2'b01,  // run, PID on:  switches give the speed setpoint
    MODE_TEST_OPEN   = 2'b10,  // test, PID off: open-loop duty step
    MODE_TEST_CLOSED = 2'b11   // test, PID on:  closed-loop setpoint step
  } mode_e;

  // One record of the test-mode data stream.
  typedef struct packed {
    logic [15:0] time_stamp;  // capture ticks since the test began, divided by 256
    logic [15:0] rpm;         // measured speed
  } log_word_t;

  // Speed in RPM from a count of capture ticks, for models and testbenches.
  function automatic int unsigned rpm_from_ticks(int unsigned rpm_num, int unsigned ticks);
    int unsigned q;
    if (ticks == 0) return 32'hFFFF;
    q = rpm_num / ticks;
    return (q > 32'hFFFF) ? 32'hFFFF : q;
  endfunction

endpackage
