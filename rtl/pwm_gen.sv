// PWM generator for one DC motor.
//
// Takes a signed 12-bit motor command and produces a sign-magnitude drive: a
// direction bit and a pulse-width-modulated enable. A free-running counter of
// PWM_W-1 bits sets the period (2^(PWM_W-1) clocks); the pulse is high while
// the counter is below the command's magnitude, so the duty cycle is
// |duty| / 2^(PWM_W-1). The most negative command is treated as full scale.
// The command is sampled at the start of each period, so a period is never cut
// short. `en` low forces the output off at once.
//
// The 12-bit command width follows the design; the sign-magnitude output and
// the counter-compare scheme are choices of this implementation.
module pwm_gen #(
  parameter int unsigned PWM_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [PWM_W-1:0] duty,
  output logic                    pwm,
  output logic                    dir,        // 1: negative direction
  output logic                    period_start
);
  localparam int unsigned MW = PWM_W - 1;

  logic [MW-1:0] cnt;
  logic [MW:0]   mag_now, mag_q;
  logic          dir_q;

  always_comb begin
    // -2^(PWM_W-1) negates to itself, which read unsigned is full scale.
    if (duty < 0) mag_now = (MW+1)'(-duty);
    else          mag_now = (MW+1)'(duty);
  end

  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      mag_q <= '0;
      dir_q <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) begin
        mag_q <= mag_now;
        dir_q <= duty[PWM_W-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm <= 1'b0;
      dir <= 1'b0;
    end else begin
      pwm <= en && ({1'b0, cnt} < mag_q);
      dir <= dir_q;
    end
  end
endmodule
