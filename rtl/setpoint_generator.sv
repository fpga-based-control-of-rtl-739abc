// Setpoint generator of one PCU.
//
// Holds the two stationary positions of the unit (POS0, the rest position,
// and POS1, the work position) and generates the motion profile between
// them: on every sample `tick` the setpoint steps VMAX counts towards the
// target, so a move is a constant-velocity ramp. It also chooses the loop
// controller's mode: servo while the setpoint ramps, regulator once it has
// reached the target, homing for a homing request.
//
// Request handshake with the sequence controller: `req` is held (not
// REQ_NONE) until `ready` pulses for one clock. REQ_HOME completes when the
// loop controller reports the home switch found (the setpoint is then 0);
// REQ_POS0/REQ_POS1 complete when the ramp has ended and the loop controller
// reports the position reached.
//
// Override: while `override` is high, requests are not served. The override
// state ST_PARK ramps the unit to POS1 and keeps it there (a door that must
// stay open); ST_SAFE switches the loop controller off (its history is
// cleared, so nothing winds up while the motor is forced off); any other
// state freezes the setpoint where it is (regulator mode). Before homing has
// finished an override keeps the loop controller off. A request that was interrupted is served again from the start once
// the override is released, because the requester still holds it.
//
// The stationary positions, the profile generation, the three modes and the
// override input follow the design; the constant-velocity profile, VMAX and
// the handshake are choices of this implementation.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module setpoint_generator
  import pcu_pkg::*;
#(
  parameter int unsigned POS_W = pcu_pkg::POS_W,
  parameter int          POS0  = 200,
  parameter int          POS1  = 1000,
  parameter int          VMAX  = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  sp_req_e                 req,
  output logic                    ready,
  input  logic                    ovr_active,
  input  pcu_state_e              ovr_state,
  input  logic                    loop_done,
  output logic signed [POS_W-1:0] setpoint,
  output loop_mode_e              mode,
  output logic                    moving
);
  typedef enum logic [2:0] {G_IDLE, G_HOMING, G_RAMP, G_SETTLE, G_OVR} gen_state_e;

  gen_state_e              st;
  logic                    homed;
  logic signed [POS_W-1:0] target;
  logic signed [POS_W-1:0] next_sp;
  logic signed [POS_W-1:0] step_v;

  // One ramp step towards the target.
  always_comb begin
    step_v = POS_W'(VMAX);
    if (target > setpoint)
      next_sp = (target - setpoint > step_v) ? setpoint + step_v : target;
    else
      next_sp = (setpoint - target > step_v) ? setpoint - step_v : target;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= G_IDLE;
      homed    <= 1'b0;
      target   <= '0;
      setpoint <= '0;
      mode     <= MODE_OFF;
      ready    <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (ovr_active) begin
        // Override: abort what was running and obey the override state.
        st <= G_OVR;
        if (!homed || ovr_state == ST_SAFE) begin
          mode   <= MODE_OFF;             // not homed, or faulty: motor off
          target <= setpoint;
        end else if (ovr_state == ST_PARK) begin
          target <= POS_W'(POS1);
          if (tick) setpoint <= next_sp;
          mode   <= (setpoint == POS_W'(POS1)) ? MODE_REGULATOR : MODE_SERVO;
        end else begin
          target <= setpoint;
          mode   <= MODE_REGULATOR;
        end
      end else begin
        unique case (st)
          G_OVR: begin
            st <= G_IDLE;
            if (homed) mode <= MODE_REGULATOR;
          end
          G_IDLE: if (!ready) begin
            unique case (req)
              REQ_HOME: begin
                st   <= G_HOMING;
                mode <= MODE_HOMING;
              end
              REQ_POS0, REQ_POS1: begin
                target <= (req == REQ_POS0) ? POS_W'(POS0) : POS_W'(POS1);
                st     <= G_RAMP;
                mode   <= MODE_SERVO;
              end
              default: ;
            endcase
          end
          G_HOMING: if (loop_done) begin
            homed    <= 1'b1;
            setpoint <= '0;
            target   <= '0;
            mode     <= MODE_REGULATOR;
            st       <= G_SETTLE;
          end
          G_RAMP: begin
            if (setpoint == target) begin
              mode <= MODE_REGULATOR;
              st   <= G_SETTLE;
            end else if (tick) begin
              setpoint <= next_sp;
            end
          end
          G_SETTLE: if (loop_done && mode == MODE_REGULATOR) begin
            ready <= 1'b1;
            st    <= G_IDLE;
          end
          default: st <= G_IDLE;
        endcase
      end
    end
  end

  assign moving = (st == G_RAMP);

  assert property (@(posedge clk) disable iff (!rst_n) ready |=> !ready)
    else $error("setpoint_generator: ready longer than one clock");
endmodule
