// tb_user_if: checks the switch decoding (setpoint, PID enable, test mode, mode enum),
// that a bouncing switch changes nothing until it has been steady for DEBOUNCE clocks,
// the exact delay of 2 + DEBOUNCE clocks, and that mode_changed pulses once per mode
// change and not for a setpoint change.
module tb_user_if;
  import motor_pkg::*;
  localparam int unsigned DB = 20;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [9:0] sw;
  logic [7:0] setpoint;
  logic       pid_en, test_mode, mode_changed;
  mode_e      mode;
  int         checks = 0, failures = 0;
  int         n_mc = 0;

  user_if #(.DEBOUNCE(DB)) dut (.*);

  always #10ns clk = ~clk;
  always @(posedge clk) if (mode_changed) n_mc++;

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

  // Set the switches after a few bounces and check when the outputs follow.
  task automatic set_sw(input logic [9:0] v);
    logic [9:0] old;
    int t, mc0;
    old = {test_mode, pid_en, setpoint};
    mc0 = n_mc;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk) sw = v;
      repeat ($urandom_range(1, DB - 2)) @(negedge clk);
      sw = old;
      @(negedge clk);
      check({test_mode, pid_en, setpoint} == old, "output followed a bounce");
    end
    sw = v;
    t = 0;
    while ({test_mode, pid_en, setpoint} != v && t < 10 * DB) begin
      @(negedge clk);
      t++;
    end
    check(t == DB + 2, $sformatf("debounced after %0d clocks, expected %0d", t, DB + 2));
    check(setpoint == v[7:0] && pid_en == v[8] && test_mode == v[9], "decode");
    check(mode == mode_e'(v[9:8]), "mode enum");
    repeat (3) @(negedge clk);
    check(n_mc - mc0 == ((v[9:8] != old[9:8]) ? 1 : 0),
          $sformatf("mode_changed pulsed %0d times", n_mc - mc0));
  endtask

  initial begin
    sw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(setpoint == 0 && mode == MODE_RUN_PWM, "reset state");
    set_sw({2'b00, 8'd179});
    set_sw({2'b01, 8'd125});
    set_sw({2'b01, 8'd200});
    set_sw({2'b11, 8'd162});
    set_sw({2'b10, 8'd162});
    for (int i = 0; i < 10; i++) set_sw(10'($urandom_range(0, 1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
