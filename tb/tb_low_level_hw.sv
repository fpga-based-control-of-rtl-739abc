// Self-checking test of the low-level hardware: the motor model driven by the
// block's PWM output moves, and the encoder count read back follows the
// model's position; digital inputs arrive two clocks after the pins; the
// magnet follows its command one clock later; disabling switches motor and
// magnet off and freezes the count.
module tb_low_level_hw;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, enc_a, enc_b, blk_sensor = 0, pwm, pwm_dir, magnet;
  logic [1:0] endsw, endsw_s, sw_pins = 0;
  logic enc_clr = 0, magnet_cmd = 0, blk_sensor_s, enc_glitch;
  pwm_t pwm_cmd = 0;
  pos_t pos;
  int mpos;
  int checks = 0, failures = 0;

  tb_motor_model #(.CLK_PER_COUNT(8), .START_POS(100)) motor (
    .clk, .pwm, .pwm_dir, .stuck(1'b0), .enc_a, .enc_b, .endsw(), .pos(mpos));
  assign endsw = sw_pins;

  low_level_hw dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int p0, m0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    p0 = pos; m0 = mpos;
    pwm_cmd = 12'sd1024;                  // half speed forward
    repeat (20000) @(negedge clk);
    pwm_cmd = 0;
    repeat (5000) @(negedge clk);
    check(mpos - m0 > 1000, $sformatf("motor moved forward (%0d)", mpos - m0));
    check(pos - p0 == mpos - m0, $sformatf("count %0d follows motor %0d", pos - p0, mpos - m0));
    // expected distance: half duty over 20000 clocks, 8 clocks per count
    check(mpos - m0 > 1150 && mpos - m0 < 1350, "distance matches duty");
    pwm_cmd = -12'sd2000;
    repeat (8000) @(negedge clk);
    pwm_cmd = 0;
    repeat (5000) @(negedge clk);
    check(pos - p0 == mpos - m0, "count follows reverse motion");
    check(enc_glitch == 0, "no glitch");
    // digital inputs: two clocks
    @(negedge clk) begin sw_pins = 2'b10; blk_sensor = 1; end
    @(negedge clk) check(endsw_s == 0 && !blk_sensor_s, "inputs not through after one clock");
    @(negedge clk) check(endsw_s == 2'b10 && blk_sensor_s, "inputs through after two clocks");
    // magnet
    @(negedge clk) magnet_cmd = 1;
    @(negedge clk) check(magnet, "magnet on");
    // disable
    en = 0; pwm_cmd = 12'sd2000;
    repeat (5000) @(negedge clk);
    check(!magnet && !pwm, "outputs off when disabled");
    check(pos - p0 == mpos - m0, "count unchanged when disabled");
    // clear
    @(negedge clk) enc_clr = 1; @(negedge clk) enc_clr = 0;
    check(pos == 0, "encoder cleared");
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
