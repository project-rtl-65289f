// speed_calc: converts a slot interval into motor speed, RPM = RPM_NUM / n.
//
// With 30 slots per revolution, RPM = 2 / T for a slot interval of T seconds. An interval
// of n capture ticks of PRESCALE clocks is T = n * PRESCALE / CLK_HZ, so
// RPM = RPM_NUM / n with RPM_NUM = 2 * CLK_HZ / PRESCALE (195312 at 50 MHz and 10.24 us).
// The division is a restoring divider that produces one quotient bit per clock, so a
// result is ready NUM_BITS + 2 clocks after it is accepted (20 clocks by default), far
// inside the shortest 1 ms slot interval. Results above 16 bits, and n = 0, give 65535.
//
// The formula follows the original design; doing the division in hardware with this divider is a
// choice made here (the original computed the speed in processor software).
//
// Ports: in_valid/in_ready/interval (valid-ready input), out_valid/out_ready/rpm
// (valid-ready output). in_ready is high only when the unit is idle.
module speed_calc #(
  parameter int unsigned CNT_BITS = 12,
  parameter int unsigned RPM_NUM  = 195312,
  parameter int unsigned RPM_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [CNT_BITS-1:0] interval,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [RPM_BITS-1:0] rpm
);

  localparam int unsigned NUM_BITS = $clog2(RPM_NUM + 1);
  localparam int unsigned SW       = $clog2(NUM_BITS + 1);
  localparam logic [NUM_BITS-1:0] NUM = NUM_BITS'(RPM_NUM);

  typedef enum logic [1:0] {IDLE, DIVIDE, DONE} state_e;
  state_e state_q;

  logic [CNT_BITS-1:0] den_q;
  logic [CNT_BITS-1:0] rem_q;
  logic [NUM_BITS-1:0] quo_q;
  logic [SW-1:0]       step_q;
  logic [CNT_BITS:0]   rem_shift;
  logic                fits;

  assign in_ready  = (state_q == IDLE);
  assign rem_shift = {rem_q, NUM[step_q]};
  assign fits      = rem_shift >= {1'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      den_q     <= '0;
      rem_q     <= '0;
      quo_q     <= '0;
      step_q    <= '0;
      out_valid <= 1'b0;
      rpm       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state_q)
        IDLE: if (in_valid) begin
          den_q   <= interval;
          rem_q   <= '0;
          quo_q   <= '0;
          step_q  <= SW'(NUM_BITS - 1);
          state_q <= DIVIDE;
        end
        DIVIDE: begin
          rem_q <= fits ? CNT_BITS'(rem_shift - {1'b0, den_q}) : rem_shift[CNT_BITS-1:0];
          quo_q <= {quo_q[NUM_BITS-2:0], fits};
          if (step_q == '0) state_q <= DONE;
          else              step_q  <= step_q - 1'b1;
        end
        DONE: begin
          if (den_q == '0 || quo_q > NUM_BITS'({RPM_BITS{1'b1}})) rpm <= '1;
          else                                                   rpm <= RPM_BITS'(quo_q);
          out_valid <= 1'b1;
          state_q   <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
