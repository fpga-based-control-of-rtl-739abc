// Self-checking test of the exception catcher: each check (far limit, home
// switch outside homing, position range, encoder glitch,
// stall, PWM sanity) is provoked and
// the reported code compared; also checks PWM clamping, forcing the motor
// off when safe, and that sensor values pass unchanged.
module tb_exception_catcher;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, safe = 0;
  pcu_state_e state = ST_RUN;
  pos_t hw_pos = 500, ctrl_pos;
  logic [1:0] hw_endsw = 0;
  logic hw_enc_glitch = 0, hw_blk_sensor = 0, ctrl_home_sw, ctrl_blk_sensor, ctrl_magnet = 0, hw_magnet;
  pwm_t ctrl_pwm = 0, hw_pwm;
  exc_code_e exc;
  int checks = 0, failures = 0;

  exception_catcher #(.POS_MIN(-100), .POS_MAX(1500), .PWM_LIMIT(2000), .STALL_PWM(1500), .STALL_TICKS(5)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic ticks(input int n);
    repeat (n) begin @(negedge clk) tick = 1; @(negedge clk) tick = 0; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 check(exc == EXC_NONE, "no exception at rest");
    // pass-through
    hw_blk_sensor = 1; ctrl_magnet = 1; hw_pos = 777; ctrl_pwm = 300; #1;
    check(ctrl_blk_sensor && hw_magnet && ctrl_pos == 777 && hw_pwm == 300, "values pass unchanged");
    // far limit
    hw_endsw = 2'b10; #1 check(exc == EXC_ENDSWITCH, "far limit");
    hw_endsw = 2'b01; #1 check(exc == EXC_ENDSWITCH, "home switch outside homing");
    state = ST_HOMING; #1 check(exc == EXC_NONE, "home switch allowed while homing");
    check(ctrl_home_sw, "home switch passed on");
    hw_endsw = 0; hw_pos = -500; #1 check(exc == EXC_NONE, "range not checked while homing");
    state = ST_RUN; #1 check(exc == EXC_RANGE, "below range");
    hw_pos = 1501; #1 check(exc == EXC_RANGE, "above range");
    hw_pos = 1500; #1 check(exc == EXC_NONE, "range limit inclusive");
    // encoder glitch: reported for the clock it is seen
    hw_enc_glitch = 1; #1 check(exc == EXC_ENCODER, "encoder glitch");
    hw_enc_glitch = 0; #1 check(exc == EXC_NONE, "glitch report ends with the glitch");
    // PWM sanity and clamp
    ctrl_pwm = 2001; #1 check(exc == EXC_PWM && hw_pwm == 2000, "PWM above limit clamped");
    ctrl_pwm = -2047; #1 check(exc == EXC_PWM && hw_pwm == -2000, "negative PWM clamped");
    ctrl_pwm = 1999; #1 check(exc == EXC_NONE, "PWM within limit");
    // stall: high command, position not moving
    hw_pos = 600; ctrl_pwm = 1600;
    ticks(5);
    #1 check(exc == EXC_NONE, "no stall yet");
    ticks(2);
    #1 check(exc == EXC_STALL, "stall detected");
    hw_pos = 601; ticks(1);
    #1 check(exc == EXC_NONE, "stall clears when moving");
    // moving: no stall
    for (int i = 0; i < 10; i++) begin hw_pos = hw_pos + 1; ticks(1); end
    #1 check(exc == EXC_NONE, "moving motor is no stall");
    // safe: motor forced off, magnet kept
    safe = 1; #1 check(hw_pwm == 0 && hw_magnet, "safe: motor off, magnet kept");
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
