// Self-checking test of the safety layer as a whole: start-up states, a far
// limit switch fault (motor forced off, both neighbours told, state SAFE,
// release by a user ST_RUN once the switch opens), a neighbour's PARK request
// reaching the controller as override, and a user HOLD.
module tb_safety;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  pos_t hw_pos = 500, ctrl_pos;
  logic [1:0] hw_endsw = 0;
  logic hw_enc_glitch = 0, hw_blk_sensor = 0, hw_magnet, ctrl_home_sw, ctrl_blk_sensor, ctrl_magnet = 1, ovr_active, set_valid = 0;
  pwm_t hw_pwm, ctrl_pwm = 12'sd300;
  pcu_state_e ctrl_state = ST_HOMING, to_ctrl, set_state = ST_RUN, cur_state;
  err_msg_t prev_err_in = '0, next_err_in = '0, prev_err_out, next_err_out;
  exc_code_e exc_latched;
  int checks = 0, failures = 0;

  safety #(.PREV_SAFE(ST_HOLD), .NEXT_SAFE(ST_PARK)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic clocks(input int n); repeat (n) @(negedge clk); endtask
  task automatic user(input pcu_state_e s);
    @(negedge clk) begin set_valid = 1; set_state = s; end
    @(negedge clk) set_valid = 0;
    clocks(3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    clocks(2);
    check(to_ctrl == ST_HOMING && hw_pwm == 300, "homing, motor command passed");
    ctrl_state = ST_RUN; clocks(2);
    check(to_ctrl == ST_RUN && !ovr_active, "running");
    hw_endsw = 2'b10; clocks(1); hw_endsw = 0; clocks(3);
    check(exc_latched == EXC_ENDSWITCH, "far-limit fault latched");
    check(to_ctrl == ST_SAFE && cur_state == ST_SAFE && ovr_active, "unit SAFE");
    check(hw_pwm == 0 && hw_magnet, "motor off, magnet kept");
    check(prev_err_out.active && prev_err_out.state == ST_HOLD, "previous unit held");
    check(next_err_out.active && next_err_out.state == ST_PARK, "next unit parked");
    user(ST_RUN);
    check(to_ctrl == ST_RUN && !prev_err_out.active && hw_pwm == 300, "released by the user");
    next_err_in = '{active: 1'b1, state: ST_PARK}; clocks(3);
    check(to_ctrl == ST_PARK && ovr_active, "neighbour PARK request");
    check(hw_pwm == 300, "motor stays under control when parked");
    next_err_in = '0; clocks(3);
    check(to_ctrl == ST_RUN && !ovr_active, "neighbour error gone");
    user(ST_HOLD);
    check(to_ctrl == ST_HOLD && ovr_active, "user HOLD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
