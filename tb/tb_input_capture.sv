// tb_input_capture: drives slot edges at known clock distances D and expects the
// interval floor(D / PRESCALE); checks that the first edge only starts a measurement,
// the 4-clock latency from sensor edge to cap_valid, the stall after 2^CNT_BITS - 1
// ticks without an edge, its repetition every range, and the restart after it, and the overflow when a capture
// is overwritten before it was taken.
module tb_input_capture;
  localparam int unsigned P  = 16;
  localparam int unsigned CB = 8;
  localparam int unsigned MAXC = (1 << CB) - 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          sensor_in = 1'b0;
  logic          cap_valid, cap_ready, tick, stalled, stall_evt, ovf_evt, overflow;
  logic [CB-1:0] cap_interval;
  int            checks = 0, failures = 0;
  int            n_stall_evt = 0, n_ovf_evt = 0;
  longint        cyc = 0;

  input_capture #(.PRESCALE(P), .CNT_BITS(CB)) dut (.*);

  always #5ns clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall_evt) n_stall_evt++;
    if (ovf_evt) n_ovf_evt++;
  end

  initial begin
    #20ms;
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

  longint last_rise = 0;

  // Rising edge D clocks after the previous rising edge.
  task automatic pulse_after(input int d);
    do @(posedge clk); while (cyc - last_rise < longint'(d));
    sensor_in <= 1'b1;
    last_rise = cyc;
  endtask

  task automatic fall();
    repeat (3) @(posedge clk);
    sensor_in <= 1'b0;
  endtask

  // Edge D clocks after the previous one; expect a capture of floor(D/P) within 4 clocks.
  task automatic edge_expect(input int d);
    int lat;
    pulse_after(d);
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!cap_valid && lat < 10);
    check(cap_valid, $sformatf("no capture for D=%0d", d));
    check(lat == 4, $sformatf("latency %0d clocks, expected 4", lat));
    check(int'(cap_interval) == d / P,
          $sformatf("D=%0d: interval %0d, expected %0d", d, cap_interval, d / P));
    fall();
    check(!cap_valid, "cap_valid not cleared by cap_ready");
  endtask

  initial begin
    int d;
    cap_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first edge: reference only
    pulse_after(5);
    repeat (6) @(posedge clk);
    check(!cap_valid, "first edge must not produce a capture");
    sensor_in <= 1'b0;
    edge_expect(P * 10);
    edge_expect(P * 20);
    edge_expect(P * 20 + P - 1);
    edge_expect(P * 3 + 1);
    for (int i = 0; i < 30; i++) begin
      d = $urandom_range(P * 2, P * (MAXC - 1));
      edge_expect(d);
    end
    // stall: no edge for the whole counter range
    check(!stalled, "stalled too early");
    repeat (P * MAXC - 20) @(posedge clk);
    check(!stalled, "stalled before the counter range ran out");
    repeat (40) @(posedge clk);
    check(stalled, "no stall after the counter range");
    check(n_stall_evt == 1, $sformatf("stall_evt pulsed %0d times, expected 1", n_stall_evt));
    repeat (P * MAXC) @(posedge clk);
    check(stalled && n_stall_evt == 2, "stall_evt must repeat every counter range");
    // the edge that ends the stall only restarts the measurement
    pulse_after(0);
    repeat (6) @(posedge clk);
    check(!cap_valid, "capture after a stall must be suppressed");
    check(!stalled, "stalled not cleared by an edge");
    sensor_in <= 1'b0;
    edge_expect(P * 7);
    // overflow: hold the output, two captures
    check(!overflow, "overflow set too early");
    cap_ready = 1'b0;
    pulse_after(P * 5); fall();
    repeat (5) @(posedge clk);
    check(cap_valid && !overflow, "first held capture");
    pulse_after(P * 9); fall();
    repeat (5) @(posedge clk);
    check(overflow && n_ovf_evt == 1, "overflow not reported");
    check(int'(cap_interval) == 9, $sformatf("newest interval %0d after overflow, expected 9", cap_interval));
    cap_ready = 1'b1;
    @(posedge clk);
    @(posedge clk);
    check(!cap_valid && overflow, "overflow flag must stay set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
