// step_test: autonomous step characterization for the test modes.
//
// When start pulses, the sequencer holds a first level for PRE_TICKS capture ticks,
// then steps to the level set on the switches and holds it for POST_TICKS ticks, then
// reports done and keeps the final level. The first level is 0 in open loop (a duty
// step from standstill, like the 0 to 70 % characterization) and half the switch level
// in closed loop (a setpoint step between two speeds, like the 640 to 1300 rpm test).
// The controller applies level_out as a PWM duty or, with the PID on, as a speed setpoint.
// Every speed sample taken while the test runs is sent out as a log_word_t record of a
// time stamp (capture ticks since start, divided by 256, i.e. 2.62 ms units by default)
// and the speed. The output holds one record; a sample that arrives while a record is
// still waiting is dropped and counted in dropped.
//
// That test modes run step characterizations and output their data follows the original design;
// the sequence, the levels, the hold times (0.5 s and 1.5 s by default) and the record
// format are choices made here.
//
// Ports: start, closed_loop, level (switch setting), tick (capture tick enable),
// sample_valid/sample_rpm (speed samples), level_out, active, stepped (second level
// applied), done, log_valid/log_ready/log_data, dropped (8-bit saturating count).
module step_test #(
  parameter int unsigned PRE_TICKS  = 48_828,   // 0.5 s of 10.24 us ticks
  parameter int unsigned POST_TICKS = 146_484,  // 1.5 s
  parameter int unsigned TS_SHIFT   = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  closed_loop,
  input  logic [7:0]            level,
  input  logic                  tick,
  input  logic                  sample_valid,
  input  logic [15:0]           sample_rpm,
  output logic [7:0]            level_out,
  output logic                  active,
  output logic                  stepped,
  output logic                  done,
  output logic                  log_valid,
  input  logic                  log_ready,
  output motor_pkg::log_word_t  log_data,
  output logic [7:0]            dropped
);

  localparam int unsigned TW = 32;

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_POST, S_DONE} state_e;
  state_e state_q;

  logic [TW-1:0] timer_q;   // ticks left in the current phase
  logic [TW-1:0] stamp_q;   // ticks since start
  logic [7:0]    first_level;

  assign first_level = closed_loop ? (level >> 1) : 8'd0;
  assign active      = (state_q == S_PRE) || (state_q == S_POST);
  assign stepped     = (state_q == S_POST) || (state_q == S_DONE);
  assign done        = (state_q == S_DONE);

  always_comb begin
    unique case (state_q)
      S_PRE:   level_out = first_level;
      S_POST,
      S_DONE:  level_out = level;
      default: level_out = 8'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      timer_q <= '0;
      stamp_q <= '0;
    end else if (start) begin
      state_q <= S_PRE;
      timer_q <= TW'(PRE_TICKS);
      stamp_q <= '0;
    end else if (tick && active) begin
      stamp_q <= stamp_q + 1'b1;
      if (timer_q <= 1) begin
        if (state_q == S_PRE) begin
          state_q <= S_POST;
          timer_q <= TW'(POST_TICKS);
        end else begin
          state_q <= S_DONE;
        end
      end else begin
        timer_q <= timer_q - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      log_valid <= 1'b0;
      log_data  <= '0;
      dropped   <= '0;
    end else begin
      if (log_valid && log_ready) log_valid <= 1'b0;
      if (start) begin
        dropped <= '0;
      end else if (sample_valid && active) begin
        if (log_valid && !log_ready) begin
          if (dropped != 8'hFF) dropped <= dropped + 1'b1;
        end else begin
          log_valid           <= 1'b1;
          log_data.time_stamp <= 16'(stamp_q >> TS_SHIFT);
          log_data.rpm        <= sample_rpm;
        end
      end
    end
  end

  // A waiting record stays unchanged until it is taken.
  a_log_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (log_valid && !log_ready) |=> (log_valid && $stable(log_data)));

endmodule
