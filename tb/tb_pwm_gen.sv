// tb_pwm_gen: checks the PWM period (255 steps of PRESCALE clocks, 5100 clocks and
// 9.8 kHz at 50 MHz) and the high time for duty 0, 255 and random codes, with the
// default parameters. Expected high time per period = duty * PRESCALE clocks.
module tb_pwm_gen;
  localparam int unsigned PRESCALE = 20;
  localparam int unsigned PERIOD   = 255 * PRESCALE;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] duty;
  logic       pwm, period_start;
  int         checks = 0, failures = 0;

  pwm_gen dut (.clk, .rst_n, .duty, .pwm, .period_start);

  always #10ns clk = ~clk;

  initial begin
    #50ms;
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

  task automatic wait_period_start();
    do @(posedge clk); while (!period_start);
  endtask

  task automatic measure(input logic [7:0] d);
    int high, len;
    duty = d;
    wait_period_start();   // duty taken here
    wait_period_start();
    high = 0;
    len  = 0;
    // the output is registered: the period seen at pwm starts one clock later
    @(posedge clk);
    do begin
      @(posedge clk);
      len++;
      if (pwm) high++;
    end while (!period_start);
    @(posedge clk);
    len++;
    if (pwm) high++;
    check(len == PERIOD, $sformatf("period %0d clocks, expected %0d", len, PERIOD));
    check(high == int'(d) * PRESCALE,
          $sformatf("duty %0d: high %0d clocks, expected %0d", d, high, int'(d) * PRESCALE));
  endtask

  initial begin
    duty = 8'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(8'd0);
    measure(8'd255);
    measure(8'd1);
    measure(8'd254);
    measure(8'd179);   // 70 %
    repeat (10) measure(8'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
