// user_if: the switch bank through which the controller is set up while it runs.
//
// Ten switches are read: sw[7:0] is the 8-bit setpoint, sw[8] enables the PID loop and
// sw[9] selects test mode instead of run mode. Each switch passes two synchronizing
// flip-flops and a debouncer; the debounced word changes only after the synchronized
// switches have held one new value for DEBOUNCE clocks (10 ms at 50 MHz by default).
// In run mode the setpoint is a PWM duty (PID off) or a speed (PID on); in test mode it
// sets the level of the autonomous step test. mode_changed pulses for one clock when the
// mode bits of the debounced word change.
//
// The 8-bit setpoint, the PID enable and the test/run choice follow the original design; the
// switch positions, the debouncer and its time are choices made here.
//
// Ports: sw (asynchronous switches), setpoint, pid_en, test_mode, mode (motor_pkg::mode_e),
// mode_changed. Latency: 2 + DEBOUNCE clocks from a switch change to the outputs.
module user_if #(
  parameter int unsigned DEBOUNCE = 500_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [9:0]         sw,
  output logic [7:0]         setpoint,
  output logic               pid_en,
  output logic               test_mode,
  output motor_pkg::mode_e   mode,
  output logic               mode_changed
);

  localparam int unsigned DW = $clog2(DEBOUNCE + 1);

  logic [9:0]    s1_q, s2_q, stable_q;
  logic [DW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q         <= '0;
      s2_q         <= '0;
      stable_q     <= '0;
      cnt_q        <= '0;
      mode_changed <= 1'b0;
    end else begin
      s1_q         <= sw;
      s2_q         <= s1_q;
      mode_changed <= 1'b0;
      if (s2_q == stable_q || s1_q != s2_q) begin
        cnt_q <= '0;  // nothing to change, or the switches are still moving
      end else if (cnt_q == DW'(DEBOUNCE - 1)) begin
        cnt_q        <= '0;
        stable_q     <= s2_q;
        mode_changed <= (s2_q[9:8] != stable_q[9:8]);
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign setpoint  = stable_q[7:0];
  assign pid_en    = stable_q[8];
  assign test_mode = stable_q[9];
  assign mode      = motor_pkg::mode_e'(stable_q[9:8]);

endmodule
