// Self-checking test of the state handler: controller state during start-up,
// user setState (refused while homing), priority of errState, the override
// output and the clear request on a user ST_RUN.
module tb_state_handler;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, set_valid = 0, ovr_active, clear;
  err_msg_t err_state = '0;
  pcu_state_e set_state = ST_RUN, ctrl_state = ST_HOMING, to_ctrl, cur_state;
  int checks = 0, failures = 0, clears = 0;

  state_handler dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && clear) clears++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic user(input pcu_state_e s);
    @(negedge clk) begin set_valid = 1; set_state = s; end
    @(negedge clk) set_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(to_ctrl == ST_HOMING && !ovr_active, "homing after reset, no override");
    user(ST_HOLD);
    check(to_ctrl == ST_HOMING, "user command refused while homing");
    ctrl_state = ST_RUN; @(negedge clk); @(negedge clk);
    check(to_ctrl == ST_RUN && !ovr_active, "RUN once the controller is homed");
    user(ST_HOLD);
    check(to_ctrl == ST_HOLD && ovr_active && cur_state == ST_HOLD, "user HOLD with override");
    user(ST_RUN);
    check(to_ctrl == ST_RUN && !ovr_active, "user RUN");
    check(clears == 1, "user RUN asks to clear faults");
    err_state = '{active: 1'b1, state: ST_SAFE}; #1;
    check(to_ctrl == ST_SAFE && ovr_active, "errState has the highest priority");
    user(ST_HOLD);
    check(to_ctrl == ST_SAFE, "user cannot override an error");
    err_state = '{active: 1'b1, state: ST_PARK}; #1;
    check(to_ctrl == ST_PARK && ovr_active && cur_state == ST_PARK, "PARK from a neighbour");
    err_state = '0; #1;
    check(to_ctrl == ST_HOLD, "back to the user state when the error is gone");
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
