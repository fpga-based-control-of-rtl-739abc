// Safety layer of one PCU: exception catcher, exception handler and state
// handler in a chain.
//
// All sensor and actuator traffic between the controller and the low-level
// hardware passes the exception catcher. Its exceptions go to the exception
// handler, which puts this unit in ST_SAFE (motor forced off) and tells both
// neighbours over the error channels; it also turns the neighbours' error
// messages into a state for this unit. The state handler merges that state
// with the user's setState and the controller's own state, and drives the
// state and override channels of the controller.
//
// The three-stage structure and its channels follow the design; the
// individual checks and the state set are choices of this implementation.
module safety
  import pcu_pkg::*;
#(
  parameter pcu_state_e PREV_SAFE   = ST_HOLD,
  parameter pcu_state_e NEXT_SAFE   = ST_HOLD,
  parameter int         POS_MIN     = -100,
  parameter int         POS_MAX     = 1500,
  parameter int         PWM_LIMIT   = 2000,
  parameter int         STALL_PWM   = 1500,
  parameter int         STALL_TICKS = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  // low-level hardware side
  input  pos_t       hw_pos,
  input  logic [1:0] hw_endsw,
  input  logic       hw_blk_sensor,
  input  logic       hw_enc_glitch,
  output pwm_t       hw_pwm,
  output logic       hw_magnet,
  // controller side
  output pos_t       ctrl_pos,
  output logic       ctrl_home_sw,
  output logic       ctrl_blk_sensor,
  input  pwm_t       ctrl_pwm,
  input  logic       ctrl_magnet,
  input  pcu_state_e ctrl_state,
  output pcu_state_e to_ctrl,
  output logic       ovr_active,
  // neighbours
  input  err_msg_t   prev_err_in,
  input  err_msg_t   next_err_in,
  output err_msg_t   prev_err_out,
  output err_msg_t   next_err_out,
  // command (user interface) side
  input  logic       set_valid,
  input  pcu_state_e set_state,
  output pcu_state_e cur_state,
  output exc_code_e  exc_latched
);
  exc_code_e exc;
  err_msg_t  err_state;
  logic      clear;
  logic      safe;

  assign safe = err_state.active && err_state.state == ST_SAFE;

  exception_catcher #(
    .POS_MIN(POS_MIN), .POS_MAX(POS_MAX), .PWM_LIMIT(PWM_LIMIT),
    .STALL_PWM(STALL_PWM), .STALL_TICKS(STALL_TICKS)
  ) u_catch (
    .clk, .rst_n, .tick, .state(to_ctrl), .safe,
    .hw_pos, .hw_endsw, .hw_blk_sensor, .hw_enc_glitch,
    .ctrl_pos, .ctrl_home_sw, .ctrl_blk_sensor,
    .ctrl_pwm, .ctrl_magnet, .hw_pwm, .hw_magnet, .exc
  );

  exception_handler #(.PREV_SAFE(PREV_SAFE), .NEXT_SAFE(NEXT_SAFE)) u_exh (
    .clk, .rst_n, .exc, .clear, .prev_err_in, .next_err_in,
    .prev_err_out, .next_err_out, .err_state, .exc_latched
  );

  state_handler u_sth (
    .clk, .rst_n, .err_state, .set_valid, .set_state, .ctrl_state,
    .to_ctrl, .ovr_active, .cur_state, .clear
  );
endmodule
