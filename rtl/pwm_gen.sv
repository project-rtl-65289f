// pwm_gen: 8-bit pulse-width modulator that drives the gate of the motor MOSFET.
//
// A prescaler makes a step enable every PRESCALE clocks; a counter runs over 0..254 on
// those steps, so one PWM period is 255 steps and the output is high while the counter
// is below the duty value. Duty 0 gives a steady low, duty 255 a steady high (100 %, the
// motor at full speed), and every code in between gives duty/255 of the period. The duty
// input is sampled once per period, at the start of it, so a change never cuts a pulse
// short. With the default PRESCALE = 20 at 50 MHz the period is 5100 clocks (9.8 kHz).
//
// The 8-bit resolution and the roughly 10 kHz rate follow the original design; the 255-step period
// (so that full scale is a true 100 %) and the per-period duty update are choices made here.
//
// Ports: duty (8 bits), pwm (to the MOSFET gate), period_start (one-clock pulse when a new
// period starts and the duty is taken).
module pwm_gen #(
  parameter int unsigned PRESCALE = 20,
  parameter int unsigned BITS     = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [BITS-1:0] duty,
  output logic            pwm,
  output logic            period_start
);

  localparam int unsigned PW        = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  localparam logic [BITS-1:0] TOP   = {BITS{1'b1}} - 1'b1;   // counter runs 0..2^BITS-2

  logic [PW-1:0]   pre_q;
  logic [BITS-1:0] cnt_q;
  logic [BITS-1:0] duty_q;
  logic            step;

  assign step = (pre_q == PW'(PRESCALE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q  <= '0;
      cnt_q  <= '0;
      duty_q <= '0;
    end else begin
      pre_q <= step ? '0 : pre_q + 1'b1;
      if (step) begin
        if (cnt_q == TOP) begin
          cnt_q  <= '0;
          duty_q <= duty;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  assign period_start = step && (cnt_q == TOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (cnt_q < duty_q);
  end

endmodule
