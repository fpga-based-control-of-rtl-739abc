// Self-checking test of the sequence controller (sensor start and magnet
// enabled). A stand-in setpoint generator answers each request after a fixed
// delay. Checks the start-up order (homing, rest position, ST_RUN), the
// rendezvous with both neighbours (tags passed on unchanged, offer held until
// taken), the magnet during a carry, refusal of blocks outside ST_RUN, the
// sensor start with fresh tags and the block count.
module tb_sequence_controller;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0;
  pcu_state_e state_in = ST_HOMING, state_out;
  logic prev_req = 0, prev_ack, next_req, next_ack = 0, blk_sensor = 0, magnet_cmd, sp_ready = 0, busy;
  blk_t prev_blk = '0, next_blk;
  sp_req_e sp_req;
  logic [15:0] blocks_done;
  int checks = 0, failures = 0;
  sp_req_e req_log [$];

  sequence_controller #(.SENSOR_START(1'b1), .USE_MAGNET(1'b1)) dut (.*);
  always #5 clk = ~clk;

  // Setpoint generator stand-in: ready 8 clocks after a request appears.
  int age = 0;
  sp_req_e last_req = REQ_NONE;
  always @(posedge clk) begin
    sp_ready <= 1'b0;
    if (sp_req != REQ_NONE && !sp_ready) begin
      if (age == 0) req_log.push_back(sp_req);
      age <= age + 1;
      if (age == 7) begin sp_ready <= 1'b1; age <= 0; end
    end else age <= 0;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Offer a block from the previous unit; returns clocks until it was taken.
  task automatic offer(input blk_t tag, input int max_wait, output bit taken);
    int n = 0;
    @(negedge clk) begin prev_req = 1; prev_blk = tag; end
    taken = 0;
    while (n < max_wait) begin
      @(posedge clk);
      if (prev_ack) begin taken = 1; break; end
      n++;
    end
    @(negedge clk) prev_req = 0;
  endtask

  // Take the block offered to the next unit and check its tag.
  task automatic take(input blk_t tag);
    int n = 0;
    while (!next_req && n < 1000) begin @(negedge clk); n++; end
    check(next_req, "block offered to the next unit");
    check(next_blk == tag, $sformatf("tag %0d expected %0d", next_blk, tag));
    check(magnet_cmd, "magnet on while the block is carried");
    repeat (5) @(negedge clk);
    check(next_req && next_blk == tag, "offer held until taken");
    next_ack = 1; @(negedge clk); next_ack = 0;
    check(!magnet_cmd, "magnet off after hand-over");
  endtask

  bit t;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(req_log.size() == 2 && req_log[0] == REQ_HOME && req_log[1] == REQ_POS0, "homing then rest position");
    check(state_out == ST_RUN, "reports ST_RUN after start-up");
    // not in ST_RUN yet: a block must be refused
    offer(8'd42, 50, t);
    check(!t, "block refused before ST_RUN");
    state_in = ST_RUN;
    offer(8'd42, 50, t);
    check(t, "block accepted in ST_RUN");
    take(8'd42);
    repeat (30) @(negedge clk);
    check(blocks_done == 1, "one block counted");
    // HOLD: refuse
    state_in = ST_HOLD;
    offer(8'd7, 50, t);
    check(!t, "block refused in ST_HOLD");
    state_in = ST_RUN;
    repeat (30) @(negedge clk);    // returns to rest after the hold
    offer(8'd7, 50, t);
    check(t, "block accepted again");
    take(8'd7);
    repeat (30) @(negedge clk);
    // sensor start: fresh tags 1, 2
    blk_sensor = 1;
    @(negedge clk); @(negedge clk);
    blk_sensor = 0;
    take(8'd1);
    repeat (30) @(negedge clk);
    blk_sensor = 1; @(negedge clk); @(negedge clk); blk_sensor = 0;
    take(8'd2);
    repeat (30) @(negedge clk);
    check(blocks_done == 4, $sformatf("four blocks counted (%0d)", blocks_done));
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
