// Production Cell Unit (PCU): one robot of the production cell.
//
// Four processes run side by side: the controller (sequence controller,
// setpoint generator, loop controller), the safety layer (exception catcher,
// exception handler, state handler), the command process (host register
// port) and the low-level hardware (encoder, PWM, digital I/O). Every signal
// between the controller and the hardware passes the safety layer.
//
// Towards the neighbours a PCU has a rendezvous channel in the block
// direction (prev_* in, next_* out) and an error channel in each direction.
// `hw_en` low keeps the motor and magnet off (Init/Terminate phases).
//
// The process structure and the channels follow the design; the per-unit
// parameters are this implementation's values for the six units.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module pcu
  import pcu_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV   = pcu_pkg::CLK_HZ / pcu_pkg::SAMPLE_HZ,
  parameter int          POS0         = 200,
  parameter int          POS1         = 1000,
  parameter int          VMAX         = 20,
  parameter bit          SENSOR_START = 1'b0,
  parameter bit          USE_MAGNET   = 1'b0,
  parameter int          BUF_DEPTH    = 1,
  parameter pcu_state_e  PREV_SAFE    = ST_HOLD,
  parameter pcu_state_e  NEXT_SAFE    = ST_HOLD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hw_en,
  // production cell I/O
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic [1:0]  endsw,
  input  logic        blk_sensor,
  output logic        pwm,
  output logic        pwm_dir,
  output logic        magnet,
  // rendezvous channels
  input  logic        prev_req,
  input  blk_t        prev_blk,
  output logic        prev_ack,
  output logic        next_req,
  output blk_t        next_blk,
  input  logic        next_ack,
  // error channels
  input  err_msg_t    prev_err_in,
  input  err_msg_t    next_err_in,
  output err_msg_t    prev_err_out,
  output err_msg_t    next_err_out,
  // host register port
  input  logic        host_sel,
  input  logic        host_wr,
  input  logic [2:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid
);
  // low-level hardware <-> safety
  pos_t       hw_pos;
  logic [1:0] hw_endsw;
  logic       hw_blk_sensor, hw_magnet, enc_glitch;
  pwm_t       hw_pwm;
  // safety <-> controller
  pos_t       ctrl_pos, setpoint;
  logic       ctrl_home_sw, ctrl_blk_sensor, ctrl_magnet, enc_clr;
  pwm_t       ctrl_pwm;
  pcu_state_e ctrl_state, to_ctrl, cur_state, set_state;
  logic       ovr_active, set_valid, tick;
  loop_mode_e mode;
  exc_code_e  exc_latched;
  logic [15:0] blocks_done;

  low_level_hw u_hw (
    .clk, .rst_n, .en(hw_en),
    .enc_a, .enc_b, .endsw, .blk_sensor, .pwm, .pwm_dir, .magnet,
    .enc_clr, .pwm_cmd(hw_pwm), .magnet_cmd(hw_magnet),
    .pos(hw_pos), .endsw_s(hw_endsw), .blk_sensor_s(hw_blk_sensor),
    .enc_glitch
  );

  safety #(.PREV_SAFE(PREV_SAFE), .NEXT_SAFE(NEXT_SAFE)) u_safety (
    .clk, .rst_n, .tick,
    .hw_pos, .hw_endsw, .hw_blk_sensor, .hw_enc_glitch(enc_glitch), .hw_pwm, .hw_magnet,
    .ctrl_pos, .ctrl_home_sw, .ctrl_blk_sensor, .ctrl_pwm, .ctrl_magnet,
    .ctrl_state, .to_ctrl, .ovr_active,
    .prev_err_in, .next_err_in, .prev_err_out, .next_err_out,
    .set_valid, .set_state, .cur_state, .exc_latched
  );

  controller #(
    .SAMPLE_DIV(SAMPLE_DIV), .POS0(POS0), .POS1(POS1), .VMAX(VMAX),
    .SENSOR_START(SENSOR_START), .USE_MAGNET(USE_MAGNET), .BUF_DEPTH(BUF_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .state_in(to_ctrl), .state_out(ctrl_state), .ovr_active, .ovr_state(to_ctrl),
    .prev_req, .prev_blk, .prev_ack, .next_req, .next_blk, .next_ack,
    .pos(ctrl_pos), .home_sw(ctrl_home_sw), .blk_sensor(ctrl_blk_sensor),
    .pwm_cmd(ctrl_pwm), .enc_clr, .magnet_cmd(ctrl_magnet),
    .setpoint, .mode, .tick, .blocks_done
  );

  command u_cmd (
    .clk, .rst_n,
    .sel(host_sel), .wr(host_wr), .addr(host_addr), .wdata(host_wdata),
    .rdata(host_rdata), .rvalid(host_rvalid),
    .set_valid, .set_state,
    .cur_state, .pos(hw_pos), .setpoint, .ovr_active, .mode,
    .exc(exc_latched), .blocks_done, .pwm_cmd(ctrl_pwm)
  );
endmodule
