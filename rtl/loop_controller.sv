// Loop controller of one PCU.
//
// Runs one of three algorithms, chosen by `mode` from the setpoint generator:
//  * homing    - drive the motor at -HOME_PWM until the home switch closes,
//                then zero the encoder count (`enc_clr`) and report done;
//  * regulator - PID with the regulator gains, holding a stationary setpoint;
//  * servo     - PID with the servo gains, tracking a moving setpoint.
// In the two PID modes a PID calculation starts on every sample `tick` and the
// new motor command is applied when it finishes (pid_int latency, 5 clocks).
// `done` reports, for homing, that the home switch has been found, and for the
// PID modes that the last sampled error was within +-IN_POS_TOL counts.
// MODE_OFF, and every change of mode, clear the PID history and stop the motor
// until the next calculation.
//
// The three modes follow the design; gains, tolerance and the homing speed
// are values of this implementation.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module loop_controller
  import pcu_pkg::*;
#(
  parameter int unsigned POS_W      = pcu_pkg::POS_W,
  parameter int unsigned PWM_W      = pcu_pkg::PWM_W,
  parameter int          HOME_PWM   = 400,
  parameter int          IN_POS_TOL = 8,
  parameter pid_gains_t  G_SERVO    = pcu_pkg::GAINS_SERVO,
  parameter pid_gains_t  G_REG      = pcu_pkg::GAINS_REGULATOR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  loop_mode_e              mode,
  input  logic signed [POS_W-1:0] setpoint,
  input  logic signed [POS_W-1:0] pos,
  input  logic                    home_sw,
  output logic signed [PWM_W-1:0] pwm_cmd,
  output logic                    enc_clr,
  output logic                    done
);
  loop_mode_e                mode_q;
  logic                      mode_chg;
  logic                      homed;
  logic                      pid_start, pid_done, pid_busy;
  logic signed [PWM_W-1:0]   pid_out;
  logic signed [19:0]        pid_err;
  logic                      in_pos;
  pid_gains_t                gains;
  localparam logic signed [19:0] TOL = 20'(IN_POS_TOL);

  assign mode_chg  = (mode != mode_q);
  assign gains     = (mode == MODE_SERVO) ? G_SERVO : G_REG;
  assign pid_start = tick && !pid_busy && !mode_chg &&
                     (mode == MODE_SERVO || mode == MODE_REGULATOR);

  pid_int #(.POS_W(POS_W), .PWM_W(PWM_W)) u_pid (
    .clk, .rst_n,
    .clear   (mode_chg || mode == MODE_OFF || mode == MODE_HOMING),
    .start   (pid_start),
    .gains,
    .setpoint,
    .pos,
    .out     (pid_out),
    .err     (pid_err),
    .busy    (pid_busy),
    .done    (pid_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q  <= MODE_OFF;
      homed   <= 1'b0;
      enc_clr <= 1'b0;
      in_pos  <= 1'b0;
      pwm_cmd <= '0;
    end else begin
      mode_q  <= mode;
      enc_clr <= 1'b0;
      if (mode_chg) begin
        homed   <= 1'b0;
        in_pos  <= 1'b0;
        pwm_cmd <= '0;
      end else begin
        unique case (mode)
          MODE_OFF: pwm_cmd <= '0;
          MODE_HOMING: begin
            if (homed) begin
              pwm_cmd <= '0;
            end else if (home_sw) begin
              pwm_cmd <= '0;
              enc_clr <= 1'b1;
              homed   <= 1'b1;
            end else begin
              pwm_cmd <= PWM_W'(-HOME_PWM);
            end
          end
          default: if (pid_done) begin
            pwm_cmd <= pid_out;
            in_pos  <= (pid_err <= TOL) && (pid_err >= -TOL);
          end
        endcase
      end
    end
  end

  // Never report done in the first cycle of a new mode (stale flags).
  assign done = !mode_chg && ((mode == MODE_HOMING) ? homed : in_pos);
endmodule
