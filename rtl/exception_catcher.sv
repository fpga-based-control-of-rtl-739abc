// Exception catcher of one PCU's safety layer.
//
// Sits in the hardware path between the controller and the low-level
// hardware and inspects both directions every clock:
//  * hardware to controller: the far-limit switch closing, the home switch
//    closing outside homing, the position leaving [POS_MIN, POS_MAX] outside
//    homing, an encoder glitch (both channels changed in one clock, so a
//    count was lost), and a stall (motor command of at least STALL_PWM for
//    STALL_TICKS consecutive sample ticks with no change of position);
//  * controller to hardware (sanity check): a motor command whose magnitude
//    exceeds PWM_LIMIT. Such a command is also clamped before it reaches
//    the PWM generator.
// The first failing check is reported on `exc` for as long as it holds
// (EXC_NONE otherwise); the exception handler latches it. While `safe` is
// high the motor command to the hardware is forced to zero; the magnet is
// kept as the controller drives it, so a carried block is not dropped.
//
// Sensor values are passed to the controller unchanged and without delay;
// actuator commands pass combinationally. Which checks are made and all
// limits are choices of this implementation; the two directions of checking
// follow the design.
module exception_catcher
  import pcu_pkg::*;
#(
  parameter int POS_MIN     = -100,
  parameter int POS_MAX     = 1500,
  parameter int PWM_LIMIT   = 2000,
  parameter int STALL_PWM   = 1500,
  parameter int STALL_TICKS = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  pcu_state_e  state,
  input  logic        safe,
  // from the low-level hardware
  input  pos_t        hw_pos,
  input  logic [1:0]  hw_endsw,
  input  logic        hw_blk_sensor,
  input  logic        hw_enc_glitch,
  // to the controller
  output pos_t        ctrl_pos,
  output logic        ctrl_home_sw,
  output logic        ctrl_blk_sensor,
  // from the controller
  input  pwm_t        ctrl_pwm,
  input  logic        ctrl_magnet,
  // to the low-level hardware
  output pwm_t        hw_pwm,
  output logic        hw_magnet,
  // to the exception handler
  output exc_code_e   exc
);
  localparam pwm_t LIM = PWM_W'(PWM_LIMIT);

  pos_t        pos_last;
  logic [15:0] stall_cnt;
  logic        homing;
  pwm_t        pwm_mag;

  assign homing          = (state == ST_HOMING);
  assign ctrl_pos        = hw_pos;
  assign ctrl_home_sw    = hw_endsw[0];
  assign ctrl_blk_sensor = hw_blk_sensor;
  assign hw_magnet       = ctrl_magnet;
  assign pwm_mag         = (ctrl_pwm < 0) ? -ctrl_pwm : ctrl_pwm;

  always_comb begin
    if (safe)                 hw_pwm = '0;
    else if (ctrl_pwm > LIM)  hw_pwm = LIM;
    else if (ctrl_pwm < -LIM) hw_pwm = -LIM;
    else                      hw_pwm = ctrl_pwm;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_last  <= '0;
      stall_cnt <= '0;
    end else if (tick) begin
      pos_last <= hw_pos;
      if (!safe && pwm_mag >= PWM_W'(STALL_PWM) && hw_pos == pos_last)
        stall_cnt <= (stall_cnt == 16'hFFFF) ? stall_cnt : stall_cnt + 1'b1;
      else
        stall_cnt <= '0;
    end
  end

  always_comb begin
    if (hw_endsw[1] || (hw_endsw[0] && !homing))
      exc = EXC_ENDSWITCH;
    else if (hw_enc_glitch)
      exc = EXC_ENCODER;
    else if (!homing && (hw_pos < POS_W'(POS_MIN) || hw_pos > POS_W'(POS_MAX)))
      exc = EXC_RANGE;
    else if (stall_cnt >= 16'(STALL_TICKS))
      exc = EXC_STALL;
    else if (ctrl_pwm > LIM || ctrl_pwm < -LIM)
      exc = EXC_PWM;
    else
      exc = EXC_NONE;
  end
endmodule
