// tb_pid_ctrl: runs sequences of speed samples through the PID unit and compares each
// duty with a reference computed in the testbench from the control law
//   u = KP*e + KI*sum(e) + KD*(e - e_prev),  duty = clamp(u >> (FRAC+OUT_SHIFT), 0, 255)
// with the error sum clamped to 0 .. INT_LIM. Checks the 2-clock latency, the saturation
// flag at both ends, and that disabling clears the state.
module tb_pid_ctrl;
  localparam longint KP = 28672, KI = 410, KD = 41;
  localparam int     SHIFT = 12 + 4;
  localparam longint ILIM = 40760;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable, sample_valid, duty_valid, saturated;
  logic [15:0] measured, setpoint;
  logic [7:0]  duty;
  int          checks = 0, failures = 0;
  int          n_sat = 0;

  longint isum, eprev;

  pid_ctrl dut (.*);

  always #10ns clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic sample(input int sp, input int meas);
    longint e, u, d;
    bit     sat;
    e    = longint'(sp) - longint'(meas);
    isum = isum + e;
    if (isum > ILIM) isum = ILIM;
    if (isum < 0) isum = 0;
    u = KP * e + KI * isum + KD * (e - eprev);
    eprev = e;
    u = u >>> SHIFT;
    sat = (u < 0) || (u > 255);
    d = (u < 0) ? 0 : ((u > 255) ? 255 : u);
    if (sat) n_sat++;
    @(negedge clk);
    sample_valid = 1'b1;
    setpoint = 16'(sp);
    measured = 16'(meas);
    @(negedge clk);
    sample_valid = 1'b0;
    check(!duty_valid, "duty_valid one clock early");
    @(negedge clk);
    check(duty_valid, "duty_valid not 2 clocks after the sample");
    check(int'(duty) == int'(d), $sformatf("sp=%0d meas=%0d: duty %0d, expected %0d", sp, meas, duty, d));
    check(saturated == sat, "saturated flag wrong");
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    int m;
    enable = 1'b0;
    sample_valid = 1'b0;
    measured = '0;
    setpoint = '0;
    isum = 0;
    eprev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    // small errors around 1000 rpm: linear range
    m = 1000;
    for (int i = 0; i < 60; i++) sample(1000, 1000 + $signed($urandom_range(0, 20)) - 10 + (i < 20 ? -5 : 0));
    // large errors: both saturations and integrator clamp
    for (int i = 0; i < 40; i++) sample(2000, 100);   // sum passes +INT_LIM
    for (int i = 0; i < 80; i++) sample(0, 1800);     // and 0
    for (int i = 0; i < 60; i++) sample($urandom_range(400, 1600), $urandom_range(400, 1600));
    check(n_sat > 10, "saturation never reached");
    // disable clears the state
    @(negedge clk);
    enable = 1'b0;
    @(negedge clk);
    check(duty == 8'd0, "duty not cleared while disabled");
    enable = 1'b1;
    isum = 0;
    eprev = 0;
    for (int i = 0; i < 20; i++) sample(800, 790 + $urandom_range(0, 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
