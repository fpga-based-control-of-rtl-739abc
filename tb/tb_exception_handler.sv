// Self-checking test of the exception handler: a local exception gives
// ST_SAFE locally and the configured safe states to both neighbours, stays
// latched until cleared with the cause gone; neighbour messages give the
// requested state (PARK over HOLD), and a local error wins over them.
module tb_exception_handler;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  exc_code_e exc = EXC_NONE, exc_latched;
  err_msg_t prev_err_in = '0, next_err_in = '0, prev_err_out, next_err_out, err_state;
  int checks = 0, failures = 0;

  exception_handler #(.PREV_SAFE(ST_HOLD), .NEXT_SAFE(ST_PARK)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic clocks(input int n); repeat (n) @(negedge clk); endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    clocks(2);
    check(!err_state.active && !prev_err_out.active && !next_err_out.active, "quiet after reset");
    exc = EXC_STALL;
    clocks(1);
    exc = EXC_NONE;            // a one-clock exception must be latched
    clocks(2);
    check(exc_latched == EXC_STALL, "exception latched");
    check(err_state.active && err_state.state == ST_SAFE, "own state SAFE");
    check(prev_err_out.active && prev_err_out.state == ST_HOLD, "previous unit told HOLD");
    check(next_err_out.active && next_err_out.state == ST_PARK, "next unit told PARK");
    exc = EXC_RANGE; clocks(2);
    check(exc_latched == EXC_STALL, "first exception kept");
    clear = 1; clocks(1); clear = 0; clocks(2);
    check(err_state.active, "clear refused while the cause is present");
    exc = EXC_NONE;
    clear = 1; clocks(1); clear = 0; clocks(2);
    check(!err_state.active && !prev_err_out.active && !next_err_out.active && exc_latched == EXC_NONE, "cleared");
    // neighbour messages
    prev_err_in = '{active: 1'b1, state: ST_HOLD}; clocks(2);
    check(err_state.active && err_state.state == ST_HOLD, "HOLD from previous unit");
    check(!prev_err_out.active && !next_err_out.active, "neighbour errors are not passed on");
    next_err_in = '{active: 1'b1, state: ST_PARK}; clocks(2);
    check(err_state.state == ST_PARK, "PARK wins over HOLD");
    exc = EXC_PWM; clocks(2);
    check(err_state.state == ST_SAFE, "local error wins");
    exc = EXC_NONE; clear = 1; clocks(1); clear = 0;
    prev_err_in = '0; next_err_in = '0; clocks(2);
    check(!err_state.active, "all clear");
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
