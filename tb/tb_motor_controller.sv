// tb_motor_controller: drives the controller with captured intervals, stall events and
// switch settings, and checks:
//  - run, PID off: duty equals the switch setpoint, and the speed output is 195312 / n;
//  - a stall event gives a 0 rpm sample;
//  - run, PID on: the first duty after a sample equals the PID law computed here;
//    measured speed below target drives the duty up, above it drives it down;
//  - test mode: entering it starts the step test, records leave on the log stream,
//    the duty follows the test levels, and the test completes.
module tb_motor_controller;
  import motor_pkg::*;
  localparam int unsigned PRE = 30, POST = 40;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cap_valid, cap_ready, stall_evt, tick;
  logic [11:0] cap_interval;
  logic [7:0]  setpoint, duty, log_dropped;
  logic        pid_en, test_mode, mode_changed;
  logic [15:0] rpm;
  logic        rpm_valid, pid_saturated, test_active, test_stepped, test_done;
  logic        log_valid, log_ready;
  log_word_t   log_data;
  int          checks = 0, failures = 0, nlog = 0, tc = 0;

  motor_controller #(.PRE_TICKS(PRE), .POST_TICKS(POST)) dut (.*);

  always #10ns clk = ~clk;
  always @(posedge clk) begin
    tc <= (tc == 7) ? 0 : tc + 1;
    if (log_valid && log_ready) nlog++;
  end
  assign tick = (tc == 7);

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

  // Present one interval and wait for the resulting speed sample.
  task automatic capture(input int unsigned n, output logic [15:0] r);
    int t;
    @(negedge clk);
    cap_valid = 1'b1;
    cap_interval = 12'(n);
    do @(negedge clk); while (!cap_ready);
    cap_valid = 1'b0;
    t = 0;
    while (!rpm_valid && t < 100) begin
      @(negedge clk);
      t++;
    end
    check(rpm_valid, "no speed sample");
    r = rpm;
    repeat (4) @(negedge clk);   // let the PID finish
  endtask

  task automatic set_mode(input bit pid, input bit test, input logic [7:0] sp);
    @(negedge clk);
    setpoint = sp;
    if (pid != pid_en || test != test_mode) begin
      pid_en = pid;
      test_mode = test;
      mode_changed = 1'b1;
      @(negedge clk);
      mode_changed = 1'b0;
    end
  endtask

  initial begin
    logic [15:0] r;
    logic [7:0]  d0;
    longint      e, u;
    cap_valid = 1'b0;
    cap_interval = '0;
    stall_evt = 1'b0;
    setpoint = '0;
    pid_en = 1'b0;
    test_mode = 1'b0;
    mode_changed = 1'b0;
    log_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // run, PID off
    set_mode(1'b0, 1'b0, 8'd179);
    @(negedge clk);
    check(duty == 8'd179, "duty follows the setpoint with PID off");
    for (int i = 0; i < 10; i++) begin
      int unsigned n;
      n = $urandom_range(90, 4000);
      capture(n, r);
      check(int'(r) == int'(rpm_from_ticks(195312, n)), $sformatf("rpm %0d for n=%0d", r, n));
    end
    // stall gives a 0 rpm sample
    @(negedge clk) stall_evt = 1'b1;
    @(negedge clk) stall_evt = 1'b0;
    @(negedge clk);
    check(rpm == 16'd0, "stall must read as 0 rpm");

    // run, PID on, target 125 * 8 = 1000 rpm
    set_mode(1'b1, 1'b0, 8'd125);
    capture(200, r);   // 976 rpm: error 24
    e = 1000 - 976;
    u = (28672 * e + 410 * e + 41 * e) >>> 16;
    check(int'(duty) == int'(u), $sformatf("first PID duty %0d, expected %0d", duty, u));
    d0 = duty;
    for (int i = 0; i < 5; i++) capture(975, r);    // 200 rpm, far below
    check(duty > d0 && duty == 8'd255, "duty must rise to full scale below target");
    for (int i = 0; i < 40; i++) capture(130, r);   // 1502 rpm, above
    check(duty == 8'd0, "duty must fall to 0 above target");

    // test, PID off: open-loop step 0 -> 200
    set_mode(1'b0, 1'b1, 8'd200);
    @(negedge clk);
    check(test_active && duty == 8'd0, "open-loop test starts at duty 0");
    while (!test_stepped) capture(300, r);
    @(negedge clk);
    check(duty == 8'd200, "open-loop test steps to the switch level");
    while (!test_done) capture(300, r);
    check(nlog > 5, $sformatf("only %0d records", nlog));

    // test, PID on: closed-loop step, first target 100 * 8 = 800 rpm
    nlog = 0;
    set_mode(1'b1, 1'b1, 8'd200);
    capture(195, r);   // 1001 rpm against 800: duty 0
    check(duty == 8'd0 && test_active && !test_stepped, "closed-loop first level");
    while (!test_done) capture(195, r);   // against 1600: duty rises
    check(duty > 8'd0 && test_stepped, "closed-loop second level drives duty up");
    check(nlog > 5, "closed-loop test records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
