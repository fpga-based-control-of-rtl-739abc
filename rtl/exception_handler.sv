// Exception handler of one PCU's safety layer.
//
// Latches the first exception the catcher reports and turns it into three
// state messages: ST_SAFE for this unit (on `err_state`), PREV_SAFE for the
// previous unit and NEXT_SAFE for the next unit (on the outgoing error
// channels). It also takes the error messages of both neighbours: while a
// neighbour reports an error, this unit is sent the state that neighbour
// asks for (ST_PARK wins over ST_HOLD if both neighbours ask). A local error
// always takes precedence over a neighbour's.
//
// The latched error is released by `clear` (a user command relayed by the
// state handler), and only once the catcher no longer reports an exception.
//
// Error channels are level signals: a message is valid as long as `active`
// is high. All outputs are registered (one clock from exception to message).
// The three state messages follow the design; the level-signal form of the
// error channels and the release rule are choices of this implementation.
module exception_handler
  import pcu_pkg::*;
#(
  parameter pcu_state_e PREV_SAFE = ST_HOLD,
  parameter pcu_state_e NEXT_SAFE = ST_HOLD
) (
  input  logic      clk,
  input  logic      rst_n,
  input  exc_code_e exc,
  input  logic      clear,
  input  err_msg_t  prev_err_in,
  input  err_msg_t  next_err_in,
  output err_msg_t  prev_err_out,
  output err_msg_t  next_err_out,
  output err_msg_t  err_state,
  output exc_code_e exc_latched
);
  logic latched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched     <= 1'b0;
      exc_latched <= EXC_NONE;
    end else if (!latched && exc != EXC_NONE) begin
      latched     <= 1'b1;
      exc_latched <= exc;
    end else if (latched && clear && exc == EXC_NONE) begin
      latched     <= 1'b0;
      exc_latched <= EXC_NONE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_err_out <= '{active: 1'b0, state: ST_HOLD};
      next_err_out <= '{active: 1'b0, state: ST_HOLD};
      err_state    <= '{active: 1'b0, state: ST_HOLD};
    end else begin
      prev_err_out <= '{active: latched, state: PREV_SAFE};
      next_err_out <= '{active: latched, state: NEXT_SAFE};
      if (latched)
        err_state <= '{active: 1'b1, state: ST_SAFE};
      else if ((prev_err_in.active && prev_err_in.state == ST_PARK) ||
               (next_err_in.active && next_err_in.state == ST_PARK))
        err_state <= '{active: 1'b1, state: ST_PARK};
      else if (prev_err_in.active)
        err_state <= '{active: 1'b1, state: prev_err_in.state};
      else if (next_err_in.active)
        err_state <= '{active: 1'b1, state: next_err_in.state};
      else
        err_state <= '{active: 1'b0, state: ST_HOLD};
    end
  end
endmodule
