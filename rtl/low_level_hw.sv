// Low-level hardware of one PCU: measurement and actuation.
//
// Holds the quadrature encoder interface for the motor position, the PWM
// generator that steers the DC motor, and the digital I/O: two end switches,
// the infrared block sensor and the electromagnet output. All digital inputs
// pass a two-stage synchroniser. `en` low (before Init has finished, or after
// Terminate) keeps the motor and magnet off and the encoder count frozen.
//
// Timing: inputs reach `endsw_s`/`blk_sensor_s` two clocks after the pins;
// the magnet output is registered (one clock); PWM timing is that of pwm_gen.
//
// The set of I/O (encoder, PWM, end switches, block sensor, magnet) follows
// the design; the synchronisers and the enable are choices of this
// implementation.
module low_level_hw
  import pcu_pkg::*;
#(
  parameter int unsigned POS_W = pcu_pkg::POS_W,
  parameter int unsigned PWM_W = pcu_pkg::PWM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  // to/from the production cell
  input  logic                    enc_a,
  input  logic                    enc_b,
  input  logic [1:0]              endsw,      // [0] home switch, [1] far limit
  input  logic                    blk_sensor,
  output logic                    pwm,
  output logic                    pwm_dir,
  output logic                    magnet,
  // to/from the PCU
  input  logic                    enc_clr,
  input  logic signed [PWM_W-1:0] pwm_cmd,
  input  logic                    magnet_cmd,
  output logic signed [POS_W-1:0] pos,
  output logic [1:0]              endsw_s,
  output logic                    blk_sensor_s,
  output logic                    enc_glitch
);
  logic [2:0] sync1, sync2;
  logic       period_start_unused;

  quad_decoder #(.POS_W(POS_W)) u_enc (
    .clk, .rst_n, .en, .clr(enc_clr), .enc_a, .enc_b, .pos, .glitch(enc_glitch)
  );

  pwm_gen #(.PWM_W(PWM_W)) u_pwm (
    .clk, .rst_n, .en, .duty(pwm_cmd), .pwm, .dir(pwm_dir),
    .period_start(period_start_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1  <= '0;
      sync2  <= '0;
      magnet <= 1'b0;
    end else begin
      sync1  <= {blk_sensor, endsw};
      sync2  <= sync1;
      magnet <= en & magnet_cmd;
    end
  end

  assign endsw_s      = sync2[1:0];
  assign blk_sensor_s = sync2[2];
endmodule
