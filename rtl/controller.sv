// Controller process of one PCU: sequence controller, setpoint generator and
// loop controller, plus the sample clock that paces them.
//
// The sample tick is a one-clock pulse every SAMPLE_DIV clocks (50 MHz / 1 kHz
// by default). The sequence controller asks the setpoint generator for
// movements; the generator sets the loop controller's mode and setpoint; the
// loop controller turns setpoint and measured position into a motor command.
// `ovr_active`/`ovr_state` come from the safety layer and act on the setpoint
// generator. Hardware signals here are the ones the safety layer passes on.
//
// The three-part structure and its connections follow the design; the
// sampling period default (1 ms) follows its stated deadline, the clock
// frequency is assumed.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module controller
  import pcu_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV   = pcu_pkg::CLK_HZ / pcu_pkg::SAMPLE_HZ,
  parameter int          POS0         = 200,
  parameter int          POS1         = 1000,
  parameter int          VMAX         = 20,
  parameter bit          SENSOR_START = 1'b0,
  parameter bit          USE_MAGNET   = 1'b0,
  parameter int          BUF_DEPTH    = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // state channels
  input  pcu_state_e  state_in,
  output pcu_state_e  state_out,
  input  logic        ovr_active,
  input  pcu_state_e  ovr_state,
  // rendezvous channels
  input  logic        prev_req,
  input  blk_t        prev_blk,
  output logic        prev_ack,
  output logic        next_req,
  output blk_t        next_blk,
  input  logic        next_ack,
  // hardware interface
  input  pos_t        pos,
  input  logic        home_sw,
  input  logic        blk_sensor,
  output pwm_t        pwm_cmd,
  output logic        enc_clr,
  output logic        magnet_cmd,
  // status
  output pos_t        setpoint,
  output loop_mode_e  mode,
  output logic        tick,
  output logic [15:0] blocks_done
);
  logic [$clog2(SAMPLE_DIV+1)-1:0] div;
  sp_req_e sp_req;
  logic    sp_ready, loop_done, moving, seq_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (div == '0);
      div  <= (div == $bits(div)'(SAMPLE_DIV - 1)) ? '0 : div + 1'b1;
    end
  end

  sequence_controller #(
    .SENSOR_START(SENSOR_START), .USE_MAGNET(USE_MAGNET), .BUF_DEPTH(BUF_DEPTH)
  ) u_seq (
    .clk, .rst_n, .state_in, .state_out,
    .prev_req, .prev_blk, .prev_ack, .next_req, .next_blk, .next_ack,
    .blk_sensor, .magnet_cmd, .sp_req, .sp_ready, .blocks_done, .busy(seq_busy)
  );

  setpoint_generator #(.POS0(POS0), .POS1(POS1), .VMAX(VMAX)) u_sp (
    .clk, .rst_n, .tick, .req(sp_req), .ready(sp_ready),
    .ovr_active, .ovr_state, .loop_done, .setpoint, .mode, .moving
  );

  loop_controller u_loop (
    .clk, .rst_n, .tick, .mode, .setpoint, .pos, .home_sw,
    .pwm_cmd, .enc_clr, .done(loop_done)
  );
endmodule
