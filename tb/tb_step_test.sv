// tb_step_test: runs open- and closed-loop step tests with short hold times and a tick
// every 4 clocks. Checks the level sequence (0 or half the switch level, then the switch
// level), the phase lengths in ticks, that every speed sample during the test becomes a
// record with the right speed and time stamp, that samples outside the test are not
// logged, and that a sample arriving while a record waits is dropped and counted.
module tb_step_test;
  import motor_pkg::*;
  localparam int unsigned PRE = 40, POST = 60, TSS = 2, TICKDIV = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, closed_loop, tick, sample_valid, active, stepped, done;
  logic        log_valid, log_ready;
  logic [7:0]  level, level_out, dropped;
  logic [15:0] sample_rpm;
  log_word_t   log_data;
  int          checks = 0, failures = 0;
  int          tickcnt = 0, ticks_since_start = 0;

  step_test #(.PRE_TICKS(PRE), .POST_TICKS(POST), .TS_SHIFT(TSS)) dut (.*);

  always #10ns clk = ~clk;

  always @(posedge clk) begin
    tickcnt <= (tickcnt == TICKDIV - 1) ? 0 : tickcnt + 1;
    if (start) ticks_since_start <= 0;
    else if (tick && active) ticks_since_start <= ticks_since_start + 1;
  end
  assign tick = (tickcnt == TICKDIV - 1);

  initial begin
    #1ms;
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

  task automatic run_test(input bit cl, input logic [7:0] lv);
    int pre_t, post_t, recs, exp_ts;
    logic [15:0] r;
    closed_loop = cl;
    level = lv;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    pre_t = 0;
    post_t = 0;
    recs = 0;
    while (!done) begin
      check(active, "not active during test");
      if (!stepped) begin
        check(level_out == (cl ? lv >> 1 : 8'd0), "first level");
      end else begin
        check(level_out == lv, "second level");
      end
      if (tick) begin
        if (stepped) post_t++;
        else pre_t++;
      end
      // one speed sample every 7 clocks, each taken as a record
      if ($urandom_range(0, 6) == 0) begin
        r = 16'($urandom_range(0, 2000));
        sample_valid = 1'b1;
        sample_rpm = r;
        exp_ts = ticks_since_start >> TSS;   // stamp as it stands in the sampling clock
        @(negedge clk);
        sample_valid = 1'b0;
        if (active) begin
          check(log_valid && log_data.rpm == r, "record speed");
          check(int'(log_data.time_stamp) == exp_ts, "record time stamp");
          recs++;
        end
        continue;
      end
      @(negedge clk);
    end
    check(pre_t == PRE, $sformatf("first phase %0d ticks, expected %0d", pre_t, PRE));
    check(post_t == POST - 1 || post_t == POST, $sformatf("second phase %0d ticks", post_t));
    check(recs > 10, "too few records");
    check(level_out == lv && !active, "final level after done");
    // no logging once done
    @(negedge clk);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    @(negedge clk);
    check(!log_valid, "record outside a test");
  endtask

  initial begin
    start = 1'b0;
    closed_loop = 1'b0;
    level = '0;
    sample_valid = 1'b0;
    sample_rpm = '0;
    log_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && level_out == 0, "idle after reset");
    run_test(1'b0, 8'd179);
    run_test(1'b1, 8'd162);
    // back-pressure: a second sample while a record waits is dropped
    log_ready = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    sample_valid = 1'b1;
    sample_rpm = 16'd111;
    @(negedge clk);
    sample_rpm = 16'd222;
    @(negedge clk);
    sample_valid = 1'b0;
    @(negedge clk);
    check(log_valid && log_data.rpm == 16'd111, "waiting record kept");
    check(dropped == 8'd1, $sformatf("dropped %0d, expected 1", dropped));
    log_ready = 1'b1;
    @(negedge clk);
    check(!log_valid, "record taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
