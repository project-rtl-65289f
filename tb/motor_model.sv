// motor_model: behavioural model of the plant outside the FPGA, for simulation only:
// the MOSFET on an 18 V supply, a small DC motor, and the optical sensor that sees the
// 30 slots of a disk on the shaft. Not synthesizable.
//
// Each clock the model advances by 1 / CLK_HZ seconds of plant time:
//   v    : the switched supply (pwm ? 18 V : 0) smoothed with TAU_E (winding inductance)
//   rpm  : first order towards KV * (v - DEADBAND) with time constant TAU_M, no motion
//          below the deadband; with the defaults G(s) = 10 / (s + 10), 110 rpm/V, 1.5 V
//   slot : the disk angle in half-slots; the sensor output is high on odd half-slots,
//          so it gives 30 rising edges per revolution.
// glitch inverts the sensor output while high, to inject a noise pulse; load scales the
// steady-state speed (1.0 = nominal, 0.0 = shaft blocked).
module motor_model #(
  parameter real CLK_HZ   = 50.0e6,
  parameter real VSUPPLY  = 18.0,
  parameter real KV       = 110.0,    // rpm per volt above the deadband
  parameter real DEADBAND = 1.5,      // volts
  parameter real TAU_M    = 0.1,      // seconds
  parameter real TAU_E    = 0.002     // seconds
) (
  input  logic clk,
  input  logic pwm,
  input  logic glitch,
  input  real  load,
  output logic sensor,
  output real  rpm
);

  real v = 0.0;
  real half_slots = 0.0;
  real dt, v_eff;
  logic phase = 1'b0;

  initial rpm = 0.0;

  always @(posedge clk) begin
    dt = 1.0 / CLK_HZ;
    v = v + ((pwm ? VSUPPLY : 0.0) - v) * dt / TAU_E;
    v_eff = (v > DEADBAND) ? (v - DEADBAND) : 0.0;
    rpm = rpm + (KV * v_eff * load - rpm) * dt / TAU_M;
    // 30 slots per revolution, two half-slots per slot: 60 half-slots per revolution
    half_slots = half_slots + rpm / 60.0 * 60.0 * dt;
    if (half_slots >= 1.0) begin
      half_slots = half_slots - 1.0;
      phase = ~phase;
    end
  end

  assign sensor = phase ^ glitch;

endmodule
