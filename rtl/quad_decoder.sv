// Quadrature encoder interface.
//
// Counts the edges of the motor encoder's A and B channels into a signed
// position (four counts per encoder line). Both channels pass a two-stage
// synchroniser first; each clock the previous and present (A,B) pairs are
// compared, a Gray-code step forward adds one, a step backward subtracts one,
// and a jump over two steps (both channels changed at once) is ignored and
// flagged on `glitch` for one cycle.
//
// Interface: `clr` zeroes the count (used when homing has found the home
// switch); `en` low freezes the count. Timing: a channel edge shows in `pos`
// three clocks later (two synchroniser stages and the counter register).
// For the first three clocks after reset the synchroniser is still filling:
// the (A,B) pair is only taken as the reference then, so the jump from the
// reset value to the real levels is neither counted nor flagged.
//
// The design calls for a quadrature encoder interface per motor; the x4
// decoding, the synchroniser and the counter width are choices of this
// implementation.
module quad_decoder #(
  parameter int unsigned POS_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic                    enc_a,
  input  logic                    enc_b,
  output logic signed [POS_W-1:0] pos,
  output logic                    glitch
);
  logic [1:0] sync_a, sync_b;
  logic [1:0] prev_ab, cur_ab;
  logic [1:0] fill;   // clocks since reset, saturating at 3
  logic       valid;  // prev_ab holds a real sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
    end else begin
      sync_a <= {sync_a[0], enc_a};
      sync_b <= {sync_b[0], enc_b};
    end
  end

  assign cur_ab = {sync_a[1], sync_b[1]};
  assign valid  = (fill == 2'd3);

  // Step direction from the Gray sequence 00 -> 10 -> 11 -> 01 -> 00 (A leads).
  logic step_up, step_dn, step_bad;
  always_comb begin
    step_up  = 1'b0;
    step_dn  = 1'b0;
    step_bad = 1'b0;
    unique case ({prev_ab, cur_ab})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: step_up  = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: step_dn  = 1'b1;
      4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: step_bad = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill    <= '0;
      prev_ab <= '0;
      pos     <= '0;
      glitch  <= 1'b0;
    end else begin
      if (!valid) fill <= fill + 1'b1;
      prev_ab <= cur_ab;
      glitch  <= en & valid & step_bad;
      if (clr)
        pos <= '0;
      else if (en && valid && step_up)
        pos <= pos + 1'b1;
      else if (en && valid && step_dn)
        pos <= pos - 1'b1;
    end
  end
endmodule
