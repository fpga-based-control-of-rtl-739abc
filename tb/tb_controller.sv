// Self-checking test of the controller process on a simple motor model
// (position moves pwm/16 counts per sample tick, home switch at or below 0).
// Runs the start-up (homing, move to rest), one block through the unit
// (take, move to the work position, hand over, return), and a HOLD override
// in the middle of a move. Positions are checked against the model.
module tb_controller;
  import pcu_pkg::*;
  localparam int DIV = 50, P0 = 200, P1 = 900;
  logic clk = 0, rst_n = 0;
  pcu_state_e state_in = ST_HOMING, state_out, ovr_state = ST_HOLD;
  logic ovr_active = 0, prev_req = 0, prev_ack, next_req, next_ack = 0;
  blk_t prev_blk = 0, next_blk;
  pos_t pos, setpoint;
  logic home_sw, blk_sensor = 0, enc_clr, magnet_cmd, tick;
  pwm_t pwm_cmd;
  loop_mode_e mode;
  logic [15:0] blocks_done;
  int checks = 0, failures = 0;
  int ppos = 350, offset = 0;

  controller #(.SAMPLE_DIV(DIV), .POS0(P0), .POS1(P1), .VMAX(20)) dut (.*);
  always #5 clk = ~clk;

  assign home_sw = (ppos <= 0);
  assign pos = ppos - offset;
  always @(posedge clk) begin
    if (rst_n && enc_clr) offset <= ppos;
    if (rst_n && tick) ppos <= ppos + pwm_cmd / 16;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wait_for(input int max_clocks, ref logic sig);
    int n = 0;
    while (!sig && n < max_clocks) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      int n = 0;
      while (state_out != ST_RUN && n < 500000) begin @(negedge clk); n++; end
    end
    check(state_out == ST_RUN, "start-up finished");
    check(pos >= P0 - 8 && pos <= P0 + 8, $sformatf("at rest position (%0d)", pos));
    check(offset > -20 && offset < 5, $sformatf("homed at the switch (%0d)", offset));
    state_in = ST_RUN;
    @(negedge clk) begin prev_req = 1; prev_blk = 8'd99; end
    wait_for(1000, prev_ack);
    check(prev_ack, "block taken");
    @(negedge clk) prev_req = 0;
    // HOLD override during the move to the work position
    repeat (15 * DIV) @(negedge clk);
    check(mode == MODE_SERVO, "moving in servo mode");
    state_in = ST_HOLD; ovr_state = ST_HOLD; ovr_active = 1;
    repeat (5 * DIV) @(negedge clk);
    begin
      int held;
      held = setpoint;
      repeat (100 * DIV) @(negedge clk);
      check(setpoint == held, "setpoint frozen under override");
      check(pos - held <= 12 && held - pos <= 12, $sformatf("held at the frozen setpoint (%0d, %0d)", held, pos));
      check(mode == MODE_REGULATOR, "regulator under override");
    end
    state_in = ST_RUN; ovr_active = 0;
    wait_for(500000, next_req);
    check(next_req && next_blk == 8'd99, "block offered with its tag");
    check(pos >= P1 - 8 && pos <= P1 + 8, $sformatf("at work position (%0d)", pos));
    @(negedge clk) next_ack = 1;
    @(negedge clk) next_ack = 0;
    begin
      int n = 0;
      while (blocks_done != 1 && n < 500000) begin @(negedge clk); n++; end
    end
    check(blocks_done == 1, "block counted");
    check(pos >= P0 - 8 && pos <= P0 + 8, $sformatf("back at rest (%0d)", pos));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
