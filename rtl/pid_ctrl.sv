// pid_ctrl: discretized PID speed controller, run once per speed measurement.
//
// Each accepted sample computes, in fixed point with FRAC fraction bits,
//   e      = setpoint - measured                      (RPM)
//   I      = I + e            (held within 0 .. INT_LIM)
//   D      = e - e_previous
//   u      = KP*e + KI*I + KD*D
//   duty   = clamp(u / 2^(FRAC+OUT_SHIFT), 0, 255)
// Because the controller runs at every slot edge rather than at a fixed rate, the sum
// and the difference are taken per sample with no time scaling: the effective gains rise
// and fall with the speed, which is the behaviour of the original design. The defaults
// are the gains of the tuned design, K = 7, I = 0.1, D = 0.01, in Q.12 form
// (28672, 410, 41). OUT_SHIFT (RPM error to PWM counts) and the clamp of the error sum
// are choices made here. The sum is held between 0 and INT_LIM, where its term alone
// gives full-scale duty: the duty can never be negative, so a negative sum would only
// be wind-up, and a single noisy sample (a short spurious interval reads as a very high
// speed) would otherwise take many samples to unwind.
// While enable is low the state is cleared and duty is 0.
//
// Ports: enable, sample_valid with measured and setpoint (16-bit RPM), duty (8 bits) and
// duty_valid (pulses when a new duty is ready), saturated (the last output was clamped).
// Timing: duty_valid and the new duty appear 2 clocks after sample_valid.
module pid_ctrl #(
  parameter int unsigned RPM_BITS  = 16,
  parameter int unsigned FRAC      = 12,
  parameter int unsigned KP        = 28672,  // 7.0
  parameter int unsigned KI        = 410,    // 0.1
  parameter int unsigned KD        = 41,     // 0.01
  parameter int unsigned OUT_SHIFT = 4,
  parameter int unsigned INT_LIM   = 40760   // KI * INT_LIM = full-scale duty
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                sample_valid,
  input  logic [RPM_BITS-1:0] measured,
  input  logic [RPM_BITS-1:0] setpoint,
  output logic [7:0]          duty,
  output logic                duty_valid,
  output logic                saturated
);

  localparam int unsigned EW = RPM_BITS + 2;   // signed error width
  localparam int unsigned IW = 24;             // signed error-sum width
  localparam int unsigned AW = 48;             // accumulator width

  logic signed [EW-1:0] err_q, err_prev_q, err_now;
  logic signed [IW-1:0] isum_q, isum_next;
  logic signed [IW:0]   isum_wide;
  logic                 calc_q;
  logic signed [AW-1:0] u, u_shift;
  logic signed [AW-1:0] e_w, i_w, d_w;

  localparam logic signed [AW-1:0] KP_S = AW'(KP);
  localparam logic signed [AW-1:0] KI_S = AW'(KI);
  localparam logic signed [AW-1:0] KD_S = AW'(KD);

  assign err_now   = EW'(signed'({2'b00, setpoint})) - EW'(signed'({2'b00, measured}));
  assign isum_wide = (IW+1)'(isum_q) + (IW+1)'(err_now);

  localparam logic signed [IW:0] ILIM_HI = (IW+1)'(INT_LIM);
  localparam logic signed [IW:0] ILIM_LO = '0;

  always_comb begin
    if (isum_wide > ILIM_HI)       isum_next = IW'(ILIM_HI);
    else if (isum_wide < ILIM_LO)  isum_next = IW'(ILIM_LO);
    else                           isum_next = IW'(isum_wide);
  end

  // Stage 2: weighted sum of the three terms, from the registered error and error sum.
  always_comb begin
    e_w = AW'(err_q);             // signed casts: sign-extended
    i_w = AW'(isum_q);
    d_w = AW'(err_q) - AW'(err_prev_q);
    u   = KP_S * e_w + KI_S * i_w + KD_S * d_w;
    u_shift = u >>> (FRAC + OUT_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q      <= '0;
      err_prev_q <= '0;
      isum_q     <= '0;
      calc_q     <= 1'b0;
      duty       <= '0;
      duty_valid <= 1'b0;
      saturated  <= 1'b0;
    end else if (!enable) begin
      err_q      <= '0;
      err_prev_q <= '0;
      isum_q     <= '0;
      calc_q     <= 1'b0;
      duty       <= '0;
      duty_valid <= 1'b0;
      saturated  <= 1'b0;
    end else begin
      calc_q     <= sample_valid;
      duty_valid <= calc_q;
      if (sample_valid) begin
        err_prev_q <= err_q;
        err_q      <= err_now;
        isum_q     <= isum_next;
      end
      if (calc_q) begin
        if (u_shift < 0) begin
          duty      <= '0;
          saturated <= 1'b1;
        end else if (u_shift > 255) begin
          duty      <= 8'hFF;
          saturated <= 1'b1;
        end else begin
          duty      <= 8'(u_shift);
          saturated <= 1'b0;
        end
      end
    end
  end

endmodule
