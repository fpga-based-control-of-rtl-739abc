// Self-checking test of one PCU with a behavioural motor, encoder and
// switches. Runs start-up, one block from the previous unit to the next,
// host register reads, then jams the motor: the unit must detect the fault,
// stop the motor, report SAFE to the host and tell both neighbours, and
// return to ST_RUN after the jam is removed and the host writes ST_RUN.
module tb_pcu;
  import pcu_pkg::*;
  localparam int DIV = 5000, P0 = 200, P1 = 900;
  logic clk = 0, rst_n = 0, hw_en = 0, enc_a, enc_b, blk_sensor = 0, pwm, pwm_dir, magnet;
  logic [1:0] endsw;
  logic prev_req = 0, prev_ack, next_req, next_ack = 0, stuck = 0;
  blk_t prev_blk = 0, next_blk;
  err_msg_t prev_err_in = '0, next_err_in = '0, prev_err_out, next_err_out;
  logic host_sel = 0, host_wr = 0, host_rvalid;
  logic [2:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int mpos;
  int checks = 0, failures = 0;

  tb_motor_model #(.CLK_PER_COUNT(39), .START_POS(300)) motor (
    .clk, .pwm, .pwm_dir, .stuck, .enc_a, .enc_b, .endsw, .pos(mpos));
  pcu #(.SAMPLE_DIV(DIV), .POS0(P0), .POS1(P1), .USE_MAGNET(1'b1),
        .PREV_SAFE(ST_HOLD), .NEXT_SAFE(ST_PARK)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic host_read(input int a, output logic [31:0] d);
    @(negedge clk) begin host_sel = 1; host_wr = 0; host_addr = 3'(a); end
    @(negedge clk) host_sel = 0;
    d = host_rdata;
  endtask
  task automatic host_write(input int a, input logic [31:0] d);
    @(negedge clk) begin host_sel = 1; host_wr = 1; host_addr = 3'(a); host_wdata = d; end
    @(negedge clk) begin host_sel = 0; host_wr = 0; end
  endtask
  task automatic wait_state(input pcu_state_e s, input int max_clocks, output bit ok);
    logic [31:0] d;
    int n = 0;
    ok = 0;
    while (n < max_clocks) begin
      host_read(0, d);
      if (d == 32'(s)) begin ok = 1; break; end
      repeat (98) @(negedge clk);
      n += 100;
    end
  endtask

  bit ok;
  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; hw_en = 1;
    wait_state(ST_RUN, 2_000_000, ok);
    check(ok, "unit running after start-up");
    host_read(1, d);
    check($signed(d) >= P0 - 8 && $signed(d) <= P0 + 8, $sformatf("rest position %0d", $signed(d)));
    // one block through the unit
    @(negedge clk) begin prev_req = 1; prev_blk = 8'd5; end
    do @(posedge clk); while (!prev_ack);
    @(negedge clk) prev_req = 0;
    repeat (5) @(negedge clk);
    check(magnet, "magnet holds the block");
    while (!next_req) @(negedge clk);
    host_read(1, d);
    check($signed(d) >= P1 - 8 && $signed(d) <= P1 + 8, $sformatf("work position %0d", $signed(d)));
    check(next_blk == 8'd5, "tag passed on");
    @(negedge clk) next_ack = 1; @(negedge clk) next_ack = 0;
    repeat (3) @(negedge clk);
    check(!magnet, "magnet released");
    repeat (100 * DIV) @(negedge clk);
    host_read(4, d);
    check(d == 1, "one block counted");
    // jam the motor during the next move
    @(negedge clk) begin prev_req = 1; prev_blk = 8'd6; end
    do @(posedge clk); while (!prev_ack);
    @(negedge clk) prev_req = 0;
    repeat (10 * DIV) @(negedge clk);
    stuck = 1;
    wait_state(ST_SAFE, 200 * DIV, ok);
    check(ok, "jam detected, unit SAFE");
    host_read(3, d);
    check(d[2:0] != 3'(EXC_NONE), $sformatf("exception code %0d", d[2:0]));
    check(prev_err_out.active && prev_err_out.state == ST_HOLD, "previous unit told to hold");
    check(next_err_out.active && next_err_out.state == ST_PARK, "next unit told to park");
    repeat (2 * DIV) @(negedge clk);
    check(!pwm, "motor off while SAFE");
    stuck = 0;
    host_write(0, 32'(ST_RUN));
    wait_state(ST_RUN, 20 * DIV, ok);
    check(ok, "back to RUN after the host command");
    check(!prev_err_out.active && !next_err_out.active, "neighbours released");
    while (!next_req) @(negedge clk);
    check(next_blk == 8'd6, "interrupted block completes its move");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
