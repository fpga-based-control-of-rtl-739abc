// Self-checking test of the command process: register reads of every status
// field (one-clock read latency), the setState write pulse, and that writes
// to other addresses or with the unit not selected do nothing.
module tb_command;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0, wr = 0, rvalid, set_valid, ovr_active = 0;
  logic [2:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  pcu_state_e set_state, cur_state = ST_HOLD;
  pos_t pos = -1234, setpoint = 5678;
  loop_mode_e mode = MODE_SERVO;
  exc_code_e exc = EXC_RANGE;
  logic [15:0] blocks_done = 16'd321;
  pwm_t pwm_cmd = -12'sd77;
  int checks = 0, failures = 0, sets = 0;

  command dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && set_valid) sets++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk) begin sel = 1; wr = 0; addr = 3'(a); end
    @(negedge clk) sel = 0;
    check(rvalid, "read data valid one clock later");
    d = rdata;
  endtask
  task automatic wrt(input int a, input logic [31:0] d, input bit s);
    @(negedge clk) begin sel = s; wr = 1; addr = 3'(a); wdata = d; end
    @(negedge clk) begin sel = 0; wr = 0; end
    @(negedge clk);
  endtask

  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(0, d); check(d == 32'(ST_HOLD), "state");
    rd(1, d); check($signed(d) == -1234, "position");
    rd(2, d); check(d == 5678, "setpoint");
    ovr_active = 1;
    rd(3, d); check(d == {26'd0, 1'b1, MODE_SERVO, EXC_RANGE}, $sformatf("flags %h", d));
    rd(4, d); check(d == 321, "block count");
    rd(5, d); check($signed(d) == -77, "motor command");
    rd(7, d); check(d == 0, "unused address reads 0");
    wrt(0, 32'(ST_HOLD), 1);
    check(sets == 1 && set_state == ST_HOLD, "setState write");
    wrt(1, 32'(ST_RUN), 1);
    wrt(0, 32'(ST_RUN), 0);
    check(sets == 1, "other writes ignored");
    wrt(0, 32'(ST_RUN), 1);
    check(sets == 2 && set_state == ST_RUN, "second setState");
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
