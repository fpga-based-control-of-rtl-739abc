// Behavioural model of one production-cell axis, for simulation only: a DC
// motor whose speed follows the PWM duty cycle, its quadrature encoder, the
// home and far-limit switches and a stall input.
//
// Every clock in which the PWM pulse is high moves an accumulator one step in
// the direction given by `pwm_dir`; every CLK_PER_COUNT steps the axis moves
// one encoder count, so speed is proportional to duty. The encoder outputs the
// Gray sequence of the position. The home switch is closed at or below
// position 0, the far-limit switch at or above FAR_LIMIT. `stuck` high stops
// the axis (a jammed block).
module tb_motor_model #(
  parameter int CLK_PER_COUNT = 390,
  parameter int START_POS     = 300,
  parameter int FAR_LIMIT     = 3000
) (
  input  logic       clk,
  input  logic       pwm,
  input  logic       pwm_dir,
  input  logic       stuck,
  output logic       enc_a,
  output logic       enc_b,
  output logic [1:0] endsw,
  output int         pos
);
  int acc = 0;
  initial pos = START_POS;

  always @(posedge clk) begin
    if (pwm && !stuck) begin
      if (acc + 1 >= CLK_PER_COUNT) begin
        acc <= 0;
        pos <= pwm_dir ? pos - 1 : pos + 1;
      end else begin
        acc <= acc + 1;
      end
    end
  end

  always_comb begin
    unique case (pos & 3)
      0: {enc_a, enc_b} = 2'b00;
      1: {enc_a, enc_b} = 2'b10;
      2: {enc_a, enc_b} = 2'b11;
      default: {enc_a, enc_b} = 2'b01;
    endcase
    endsw = {pos >= FAR_LIMIT, pos <= 0};
  end
endmodule
