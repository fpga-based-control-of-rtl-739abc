// Integer PID loop controller.
//
// Integer form of a discrete PID with a filtered derivative. With e the
// position error, the algorithm per sample is
//   uD = (a*uD' + b*(e - e') + c*e) >> S      (proportional + filtered D)
//   UI = UI' + d*uD                           (integral of uD, kept x 2^S)
//   u  = sat((UI >> S) + uD)
// where primes are the previous sample's values and a..d are the coefficients
// of the floating-point algorithm pre-multiplied by 2^S (see pcu_pkg). All
// arithmetic is integer; the shifts are arithmetic (round towards minus
// infinity). The integral is accumulated at 2^S times its weight so that
// small errors still add up instead of being truncated away. The output range is kept symmetric, +-(2^(PWM_W-1)-1). The error is clamped to +-2^(E_W-1)-1, uD to +-UD_LIM and uI to
// +-I_LIM * 2^S (anti-windup); the output is saturated to the signed PWM range.
//
// Interface and timing: a one-cycle `start` samples `setpoint` and `pos`;
// `out` is valid and `done` pulses 5 clocks later. `clear` resets
// the stored history (uD', e', uI'). `start` must not come while busy.
//
// The recurrence follows the source algorithm; the coefficient scaling,
// clamps and the five-step schedule are choices of this implementation.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module pid_int
  import pcu_pkg::*;
#(
  parameter int unsigned POS_W  = pcu_pkg::POS_W,
  parameter int unsigned PWM_W  = pcu_pkg::PWM_W,
  parameter int unsigned SHIFT  = pcu_pkg::PID_SHIFT,
  parameter int unsigned E_W    = 20,
  parameter int          UD_LIM = 1 << 20,
  parameter int          I_LIM  = (1 << (PWM_W - 1)) - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    start,
  input  pid_gains_t              gains,
  input  logic signed [POS_W-1:0] setpoint,
  input  logic signed [POS_W-1:0] pos,
  output logic signed [PWM_W-1:0] out,
  output logic signed [E_W-1:0]   err,
  output logic                    busy,
  output logic                    done
);
  localparam int signed E_MAX   = (1 <<< (E_W - 1)) - 1;
  localparam int signed OUT_MAX = (1 <<< (PWM_W - 1)) - 1;

  typedef logic signed [47:0] wide_t;

  logic [2:0]  step;            // schedule position, 0 = idle
  wide_t       e_now, e_prev;
  wide_t       ud_prev, ui_prev, ud_now, ui_now;
  wide_t       p_a, p_b, p_c;
  wide_t       diff, raw_e;

  function automatic wide_t clamp(input wide_t v, input wide_t lim);
    if (v > lim)       return lim;
    else if (v < -lim) return -lim;
    else               return v;
  endfunction

  assign raw_e = wide_t'(setpoint) - wide_t'(pos);
  assign diff  = e_now - e_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step    <= '0;
      e_now   <= '0;
      e_prev  <= '0;
      ud_prev <= '0;
      ui_prev <= '0;
      ud_now  <= '0;
      ui_now  <= '0;
      p_a     <= '0;
      p_b     <= '0;
      p_c     <= '0;
      out     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        step    <= '0;
        e_prev  <= '0;
        ud_prev <= '0;
        ui_prev <= '0;
        out     <= '0;
      end else begin
        unique case (step)
          3'd0: if (start) begin
            e_now <= clamp(raw_e, wide_t'(E_MAX));
            step  <= 3'd1;
          end
          3'd1: begin                       // three products in parallel
            p_a  <= wide_t'(gains.a) * ud_prev;
            p_b  <= wide_t'(gains.b) * diff;
            p_c  <= wide_t'(gains.c) * e_now;
            step <= 3'd2;
          end
          3'd2: begin                       // proportional + derivative part
            ud_now <= clamp((p_a + p_b + p_c) >>> SHIFT, wide_t'(UD_LIM));
            step   <= 3'd3;
          end
          3'd3: begin                       // integral part
            ui_now <= clamp(ui_prev + wide_t'(gains.d) * ud_now,
                            wide_t'(I_LIM) <<< SHIFT);
            step   <= 3'd4;
          end
          3'd4: begin                       // output and history update
            out     <= PWM_W'(clamp((ui_now >>> SHIFT) + ud_now, wide_t'(OUT_MAX)));
            e_prev  <= e_now;
            ud_prev <= ud_now;
            ui_prev <= ui_now;
            done    <= 1'b1;
            step    <= 3'd0;
          end
          default: step <= 3'd0;
        endcase
      end
    end
  end

  assign busy = (step != 3'd0);
  assign err  = E_W'(e_now);

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("pid_int: start while busy");
endmodule
