// Self-checking test of the loop controller against a simple motor model
// (position moves pwm/16 counts per sample tick; home switch at or below 0).
// Checks the homing profile (speed, encoder clear, done), the gain set used
// in regulator and servo mode, positioning to a ramped setpoint and the
// in-position flag.
module tb_loop_controller;
  import pcu_pkg::*;
  localparam int DIV = 20;
  logic clk = 0, rst_n = 0, tick = 0;
  loop_mode_e mode = MODE_OFF;
  logic signed [31:0] sp = 0, pos;
  logic home_sw, enc_clr, done;
  logic signed [11:0] pwm_cmd;
  int checks = 0, failures = 0, clr_count = 0;
  int ppos = 300, offset = 0, divc = 0;
  bit freeze = 0;

  loop_controller dut (.clk, .rst_n, .tick, .mode, .setpoint(sp), .pos, .home_sw, .pwm_cmd, .enc_clr, .done);
  always #5 clk = ~clk;

  assign home_sw = (ppos <= 0);
  assign pos     = ppos - offset;

  always @(posedge clk) begin
    divc <= (divc == DIV - 1) ? 0 : divc + 1;
    tick <= (divc == 0);
    if (rst_n && enc_clr) begin offset <= ppos; clr_count <= clr_count + 1; end
    if (tick && !freeze) ppos <= ppos + pwm_cmd / 16;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wait_ticks(input int n);
    repeat (n) begin @(posedge clk); while (!tick) @(posedge clk); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_ticks(3);
    check(pwm_cmd == 0, "motor off in MODE_OFF");
    // homing
    @(negedge clk) mode = MODE_HOMING;
    wait_ticks(2);
    check(pwm_cmd == -12'sd400, $sformatf("homing speed %0d", pwm_cmd));
    check(!done, "not done before the home switch");
    wait_ticks(40);
    check(done, "homing done");
    check(clr_count == 1, $sformatf("encoder cleared once (%0d)", clr_count));
    check(pwm_cmd == 0, "motor stopped after homing");
    check(pos == 0 || pos == -25, "position zeroed at the switch");
    // gain sets: first output after a mode change with a frozen plant
    freeze = 1;
    @(negedge clk) begin sp = pos + 100; mode = MODE_SERVO; end
    wait_ticks(1); repeat (8) @(posedge clk);
    check(pwm_cmd == 12'sd201, $sformatf("servo gains: first output %0d expected 201", pwm_cmd));
    @(negedge clk) mode = MODE_REGULATOR;
    wait_ticks(1); repeat (8) @(posedge clk);
    check(pwm_cmd == 12'sd152, $sformatf("regulator gains: first output %0d expected 152", pwm_cmd));
    freeze = 0;
    // servo along a ramp, then regulate
    @(negedge clk) begin sp = 0; mode = MODE_SERVO; end
    for (int k = 0; k < 50; k++) begin
      wait_ticks(1);
      @(negedge clk) sp = sp + 10;
    end
    check(!done || (pos - sp <= 8 && sp - pos <= 8), "done only when in position");
    @(negedge clk) mode = MODE_REGULATOR;
    wait_ticks(60);
    check(done, "in position after settling");
    check(pos >= 492 && pos <= 508, $sformatf("final position %0d", pos));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
