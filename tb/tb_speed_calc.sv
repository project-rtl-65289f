// tb_speed_calc: feeds intervals (edge cases and random values over the 12-bit range)
// and compares the speed with 195312 / n computed in the testbench, 65535 when the
// quotient does not fit 16 bits or n = 0. Also checks the fixed 20-clock latency from
// the accepting clock edge to out_valid, and that in_ready is low while dividing.
module tb_speed_calc;
  localparam int unsigned RPM_NUM = 195312;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [11:0] interval;
  logic [15:0] rpm;
  int          checks = 0, failures = 0;

  speed_calc dut (.*);

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

  task automatic convert(input int unsigned n);
    int lat;
    int unsigned expect_rpm;
    expect_rpm = (n == 0) ? 65535 : ((RPM_NUM / n > 65535) ? 65535 : RPM_NUM / n);
    @(negedge clk);
    check(in_ready, "not ready when idle");
    in_valid = 1'b1;
    interval = 12'(n);
    @(negedge clk);
    in_valid = 1'b0;
    interval = '0;
    lat = 1;
    while (!out_valid && lat < 100) begin
      check(!in_ready || lat > 19, "ready while dividing");
      @(negedge clk);
      lat++;
    end
    check(lat == 20, $sformatf("latency %0d clocks, expected 20", lat));
    check(int'(rpm) == int'(expect_rpm),
          $sformatf("n=%0d: rpm %0d, expected %0d", n, rpm, expect_rpm));
  endtask

  initial begin
    in_valid  = 1'b0;
    interval  = '0;
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    convert(0);
    convert(1);
    convert(2);
    convert(3);
    convert(97);     // ~1 ms slot interval, about 2000 rpm
    convert(98);
    convert(195);    // 1000 rpm
    convert(2930);   // ~30 ms
    convert(4095);
    for (int i = 0; i < 40; i++) convert($urandom_range(1, 4095));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
