// Self-checking test of the setpoint generator: homing request, ramps to the
// two stationary positions (step size per tick, mode during and after the
// ramp, one-clock ready), and the override states HOLD (setpoint frozen) and
// PARK (ramp to the work position), including resumption of an interrupted
// request after the override is released.
module tb_setpoint_generator;
  import pcu_pkg::*;
  localparam int DIV = 10, P0 = 200, P1 = 1000, V = 20;
  logic clk = 0, rst_n = 0, tick = 0, ready, ovr_active = 0, loop_done, moving;
  sp_req_e req = REQ_NONE;
  pcu_state_e ovr_state = ST_HOLD;
  logic signed [31:0] sp;
  loop_mode_e mode;
  int checks = 0, failures = 0, divc = 0, mode_age = 0, ramp_steps = 0, bad_steps = 0;
  logic signed [31:0] sp_last = 0;

  setpoint_generator #(.POS0(P0), .POS1(P1), .VMAX(V)) dut (
    .clk, .rst_n, .tick, .req, .ready, .ovr_active, .ovr_state, .loop_done,
    .setpoint(sp), .mode, .moving);
  always #5 clk = ~clk;

  // Loop controller stand-in: done some clocks after the mode last changed.
  loop_mode_e mode_q = MODE_OFF;
  always @(posedge clk) begin
    divc <= (divc == DIV - 1) ? 0 : divc + 1;
    tick <= (divc == 0);
    mode_q <= mode;
    mode_age <= (mode != mode_q) ? 0 : mode_age + 1;
    if (rst_n && sp != sp_last) begin
      if (sp - sp_last != V && sp_last - sp != V && !(sp == P0 || sp == P1 || sp == 0)) bad_steps <= bad_steps + 1;
      ramp_steps <= ramp_steps + 1;
    end
    sp_last <= sp;
  end
  assign loop_done = (mode == MODE_HOMING) ? (mode_age > 30) : (mode_age > 5);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Issue a request and wait for ready; returns clocks taken.
  task automatic do_req(input sp_req_e r, output int clocks);
    clocks = 0;
    @(negedge clk) req = r;
    while (!ready) begin
      @(negedge clk); clocks++;
      if (mode == MODE_SERVO) check(moving, "servo mode only while ramping");
      if (clocks > 20000) break;
    end
    @(negedge clk) req = REQ_NONE;
    check(!ready, "ready lasts one clock");
  endtask

  int c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(mode == MODE_OFF, "mode off after reset");
    do_req(REQ_HOME, c);
    check(sp == 0 && mode == MODE_REGULATOR, "after homing: setpoint 0, regulator");
    ramp_steps = 0;
    do_req(REQ_POS0, c);
    check(sp == P0, $sformatf("at POS0 (%0d)", sp));
    check(ramp_steps == P0 / V, $sformatf("POS0 ramp took %0d steps", ramp_steps));
    check(c >= (P0 / V - 1) * DIV, $sformatf("ramp not faster than VMAX per tick (%0d clocks)", c));
    ramp_steps = 0;
    do_req(REQ_POS1, c);
    check(sp == P1 && mode == MODE_REGULATOR, "at POS1, regulator");
    check(ramp_steps == (P1 - P0) / V, $sformatf("POS1 ramp took %0d steps", ramp_steps));
    // override HOLD in the middle of a ramp
    @(negedge clk) req = REQ_POS0;
    repeat (15 * DIV) @(negedge clk);
    @(negedge clk) begin ovr_active = 1; ovr_state = ST_HOLD; end
    repeat (3) @(negedge clk);
    begin
      logic signed [31:0] frozen;
      frozen = sp;
      repeat (20 * DIV) @(negedge clk);
      check(sp == frozen, $sformatf("setpoint frozen under HOLD override %0d %0d", sp, frozen));
      check(mode == MODE_REGULATOR, "regulator under HOLD override");
      check(!ready, "request not completed under override");
      check(sp != P0, "ramp interrupted");
    end
    // release: the held request completes
    @(negedge clk) ovr_active = 0;
    c = 0;
    while (!ready && c < 20000) begin @(negedge clk); c++; end
    check(ready && sp == P0, "interrupted request completed after release");
    @(negedge clk) req = REQ_NONE;
    // override PARK: go to POS1 and stay
    @(negedge clk) begin ovr_active = 1; ovr_state = ST_PARK; end
    repeat (((P1 - P0) / V + 5) * DIV) @(negedge clk);
    check(sp == P1, $sformatf("PARK moves to POS1 (%0d)", sp));
    check(mode == MODE_REGULATOR, "regulator once parked");
    @(negedge clk) ovr_active = 0;
    do_req(REQ_POS0, c);
    check(sp == P0, "back at POS0");
    check(bad_steps == 0, $sformatf("%0d ramp steps of the wrong size", bad_steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
