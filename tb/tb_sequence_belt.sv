// Self-checking test of the sequence controller as a belt that holds several
// blocks (BUF_DEPTH = 3: one carried, two waiting). A stand-in setpoint
// generator answers each request after a fixed delay. Checks that blocks are
// taken while the unit is busy until it is full, that a further offer waits
// until a place is free, that the unit starts on a waiting block straight
// after each hand-over (a block taken and one started in the same clock
// included), and that the blocks leave in the order they came.
module tb_sequence_belt;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0;
  pcu_state_e state_in = ST_HOMING, state_out;
  logic prev_req = 0, prev_ack, next_req, next_ack = 0, blk_sensor = 0, magnet_cmd, sp_ready = 0, busy;
  blk_t prev_blk = '0, next_blk;
  sp_req_e sp_req;
  logic [15:0] blocks_done;
  int checks = 0, failures = 0;

  sequence_controller #(.SENSOR_START(1'b0), .USE_MAGNET(1'b0), .BUF_DEPTH(3)) dut (.*);
  always #5 clk = ~clk;

  // Setpoint generator stand-in: ready 8 clocks after a request appears.
  int age = 0;
  always @(posedge clk) begin
    sp_ready <= 1'b0;
    if (sp_req != REQ_NONE && !sp_ready) begin
      age <= age + 1;
      if (age == 7) begin sp_ready <= 1'b1; age <= 0; end
    end else age <= 0;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Offer a block; returns whether it was taken within max_wait clocks.
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

  bit t, t4;
  int n;
  blk_t got [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (state_out != ST_RUN && n < 200) begin @(negedge clk); n++; end
    check(state_out == ST_RUN, "homed and at rest");
    state_in = ST_RUN;
    repeat (30) @(negedge clk);        // settles at rest in ST_RUN
    // three blocks in quick succession: one carried, two waiting
    for (int k = 1; k <= 3; k++) begin
      offer(blk_t'(k), 5, t);
      check(t, $sformatf("block %0d taken at once", k));
    end
    check(dut.nbuf == 2, $sformatf("two blocks waiting (%0d)", dut.nbuf));
    offer(8'd4, 40, t);
    check(!t, "fourth block refused while the belt is full");
    // hand the blocks on while block 4 keeps being offered
    fork
      offer(8'd4, 2000, t4);
      begin
        for (int k = 0; k < 4; k++) begin
          n = 0;
          while (!next_req && n < 500) begin @(negedge clk); n++; end
          got.push_back(next_blk);
          next_ack = 1; @(negedge clk); next_ack = 0;
        end
      end
    join
    check(t4, "fourth block taken once a place was free");
    check(got.size() == 4, $sformatf("four hand-overs (%0d)", got.size()));
    for (int k = 0; k < got.size(); k++)
      check(got[k] == blk_t'(k + 1), $sformatf("hand-over %0d carried tag %0d", k + 1, got[k]));
    repeat (30) @(negedge clk);
    check(blocks_done == 4, $sformatf("four blocks counted (%0d)", blocks_done));
    check(!busy && dut.nbuf == 0, "empty and idle at the end");
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
