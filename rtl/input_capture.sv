// input_capture: measures the time between successive slot edges of the optical sensor.
//
// The sensor signal is brought into the clock domain by two flip-flops and its rising
// edges are detected. A prescaler gives a tick every PRESCALE clocks (512 clocks =
// 10.24 us at 50 MHz, about 1 % resolution at the shortest 1 ms interval), and an
// interval counter counts ticks. At each edge the interval is taken and counter and
// prescaler restart, so the value reported is floor(D / PRESCALE) for D clocks between
// two edges. The first edge after reset or after a stall only starts a measurement.
//
// Stall: if the counter reaches its all-ones value no edge came within
// (2^CNT_BITS - 1) ticks (41.9 ms by default, longer than the 33 ms slot interval at
// 60 rpm); stalled goes high, stall_evt pulses, and the counter starts over, so that
// stall_evt repeats every counter range for as long as the motor stands still (the
// controller keeps receiving zero-speed samples). The next edge only restarts the
// measurement. Overflow: a new interval is taken while the previous one is still
// waiting in the output register (cap_valid high, cap_ready low); the older value is
// lost, ovf_evt pulses and the sticky overflow flag is set until reset.
//
// The tick period and the presence of overflow and stall detection follow the original design;
// the counter width and the exact meaning of "overflow" and "stall" are choices made here.
//
// Ports: sensor_in (asynchronous), cap_valid/cap_ready/cap_interval (valid-ready output
// of the interval in ticks), tick (one-clock pulse per capture tick), stalled, stall_evt,
// ovf_evt, overflow. Latency from the sensor edge to cap_valid is 4 clocks.
module input_capture #(
  parameter int unsigned PRESCALE = 512,
  parameter int unsigned CNT_BITS = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sensor_in,
  output logic                cap_valid,
  input  logic                cap_ready,
  output logic [CNT_BITS-1:0] cap_interval,
  output logic                tick,
  output logic                stalled,
  output logic                stall_evt,
  output logic                ovf_evt,
  output logic                overflow
);

  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  localparam logic [CNT_BITS-1:0] CNT_MAX = '1;

  logic [2:0]          sync_q;       // two synchronizer stages and the previous value
  logic                edge_det;
  logic [PW-1:0]       pre_q;
  logic [CNT_BITS-1:0] cnt_q, cnt_next;
  logic                have_ref_q;   // a previous edge exists to measure from

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], sensor_in};
  end
  assign edge_det = sync_q[1] && !sync_q[2];

  assign tick = (pre_q == PW'(PRESCALE - 1));

  // Counter value after this clock if no edge arrives: used so that an edge D clocks
  // after the previous one reports floor(D / PRESCALE).
  always_comb begin
    cnt_next = cnt_q;
    if (tick && cnt_q != CNT_MAX) cnt_next = cnt_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q        <= '0;
      cnt_q        <= '0;
      have_ref_q   <= 1'b0;
      stalled      <= 1'b0;
      stall_evt    <= 1'b0;
      ovf_evt      <= 1'b0;
      overflow     <= 1'b0;
      cap_valid    <= 1'b0;
      cap_interval <= '0;
    end else begin
      stall_evt <= 1'b0;
      ovf_evt   <= 1'b0;
      if (cap_valid && cap_ready) cap_valid <= 1'b0;

      if (edge_det) begin
        pre_q      <= '0;
        cnt_q      <= '0;
        have_ref_q <= 1'b1;
        stalled    <= 1'b0;
        if (have_ref_q && !stalled) begin
          cap_interval <= cnt_next;
          cap_valid    <= 1'b1;
          if (cap_valid && !cap_ready) begin
            ovf_evt  <= 1'b1;
            overflow <= 1'b1;
          end
        end
      end else begin
        pre_q <= tick ? '0 : pre_q + 1'b1;
        if (cnt_next == CNT_MAX) begin
          // a full counter range without an edge: report it, and count the next range
          stalled   <= 1'b1;
          stall_evt <= 1'b1;
          cnt_q     <= '0;
        end else begin
          cnt_q <= cnt_next;
        end
      end
    end
  end

  // An overflow is only reported together with a fresh capture in the output register.
  a_ovf_with_capture: assert property (@(posedge clk) disable iff (!rst_n)
    ovf_evt |-> cap_valid);

endmodule
