// State handler of one PCU's safety layer.
//
// Decides which state the controller is sent. Three sources, in falling
// priority:
//   1. errState from the exception handler (a local fault, or the state a
//      failing neighbour asks for);
//   2. setState from the user interface (ST_RUN or ST_HOLD; refused while
//      the unit is still homing);
//   3. the controller's own state (ST_HOMING until homing is done, then
//      ST_RUN).
// The override output is high whenever the state sent is not ST_HOMING or
// ST_RUN; it carries that state to the setpoint generator, which keeps the
// unit in it until the cause is gone. A user ST_RUN also asks the exception
// handler to release a latched fault (`clear`, one clock).
//
// `cur_state` reports the state sent, for the user interface. Outputs are
// combinational from the registered user/controller state and errState.
// The priorities and the override follow the design; the state set and the
// refusal during homing are choices of this implementation.
module state_handler
  import pcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  err_msg_t   err_state,
  input  logic       set_valid,
  input  pcu_state_e set_state,
  input  pcu_state_e ctrl_state,
  output pcu_state_e to_ctrl,
  output logic       ovr_active,
  output pcu_state_e cur_state,
  output logic       clear
);
  pcu_state_e norm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      norm  <= ST_HOMING;
      clear <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (norm == ST_HOMING) begin
        if (ctrl_state == ST_RUN) norm <= ST_RUN;
      end else if (set_valid) begin
        if (set_state == ST_RUN) begin
          norm  <= ST_RUN;
          clear <= 1'b1;
        end else if (set_state == ST_HOLD) begin
          norm <= ST_HOLD;
        end
      end
    end
  end

  assign to_ctrl   = err_state.active ? err_state.state : norm;
  assign ovr_active  = (to_ctrl != ST_HOMING) && (to_ctrl != ST_RUN);
  assign cur_state = to_ctrl;
endmodule
