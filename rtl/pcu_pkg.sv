// Shared types and constants of the production-cell controller.
//
// The controller runs six Production Cell Units (PCUs) in a ring. Every PCU is
// the same hardware; what differs between them (stationary positions, whether a
// block is picked up with a magnet, whether a block can enter from a sensor) is
// held in the per-unit tables below and selected by the unit's index.
//
// The PCU state set, the error codes and all widths that the source design
// leaves open (state width, encoder width) are choices of this implementation.
// The 12-bit PWM command width and the count of six units follow the design.
package pcu_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_PCU     = 6;   // six robots in the ring
  localparam int unsigned PWM_W     = 12;  // signed PWM command width
  localparam int unsigned POS_W     = 32;  // encoder position counter width
  localparam int unsigned BLK_W     = 8;   // block tag carried on the handshake
  localparam int unsigned CLK_HZ    = 50_000_000; // system clock (assumed)
  localparam int unsigned SAMPLE_HZ = 1_000;      // loop-control sample rate

  typedef logic signed [PWM_W-1:0] pwm_t;
  typedef logic signed [POS_W-1:0] pos_t;
  typedef logic        [BLK_W-1:0] blk_t;

  // ---------------------------------------------------------------- states
  // State carried on the state and error channels.
  typedef enum logic [2:0] {
    ST_HOMING = 3'd0,  // start-up: run the homing profile
    ST_RUN    = 3'd1,  // normal flow
    ST_HOLD   = 3'd2,  // keep the present position, take and give no blocks
    ST_PARK   = 3'd3,  // move to the work position and stay there (door open)
    ST_SAFE   = 3'd4   // local fault: motor off, magnet kept
  } pcu_state_e;

  // Loop-controller modes (chosen by the setpoint generator).
  typedef enum logic [1:0] {
    MODE_OFF       = 2'd0,
    MODE_HOMING    = 2'd1,
    MODE_REGULATOR = 2'd2,
    MODE_SERVO     = 2'd3
  } loop_mode_e;

  // Requests from the sequence controller to the setpoint generator.
  typedef enum logic [1:0] {
    REQ_NONE = 2'd0,
    REQ_HOME = 2'd1,   // homing profile
    REQ_POS0 = 2'd2,   // go to the home (rest) position
    REQ_POS1 = 2'd3    // go to the work position
  } sp_req_e;

  // Exceptions reported by the exception catcher.
  typedef enum logic [2:0] {
    EXC_NONE      = 3'd0,
    EXC_STALL     = 3'd1,  // motor driven hard but the position does not move
    EXC_RANGE     = 3'd2,  // position outside the allowed travel
    EXC_ENDSWITCH = 3'd3,  // an end switch closed outside homing
    EXC_PWM       = 3'd4,  // controller asked for more than the PWM limit
    EXC_ENCODER   = 3'd5   // both encoder channels changed in one clock
  } exc_code_e;

  // Error-channel message: valid while the sending unit is in error.
  typedef struct packed {
    logic       active;
    pcu_state_e state;  // state the receiving unit must take
  } err_msg_t;

  // ---------------------------------------------------------------- unit table
  // Unit order follows the block flow:
  // 0 feeder belt, 1 feeder, 2 molder door, 3 extractor, 4 extraction belt,
  // 5 rotation robot.
  localparam int POS0_TAB [N_PCU] = '{ 200,  200,  200,  200,  200,  200};
  localparam int POS1_TAB [N_PCU] = '{1200,  900,  700, 1000, 1200, 1100};
  // Block picked up with an electromagnet (extraction and rotation robots).
  localparam bit MAGNET_TAB [N_PCU] = '{0, 0, 0, 1, 0, 1};
  // Blocks a unit can hold at once: the belts carry a second block behind
  // the one at their output, the robots hold one.
  localparam int BUF_DEPTH_TAB [N_PCU] = '{2, 1, 1, 1, 2, 1};
  // A block can also enter the unit from its input sensor (block inserter).
  localparam bit SENSOR_START_TAB [N_PCU] = '{1, 0, 0, 0, 0, 0};
  // State each unit asks of its previous / next neighbour when it fails.
  // The feeder keeps the feeder belt where it is and has the molder door open.
  localparam pcu_state_e PREV_SAFE_TAB [N_PCU] =
    '{ST_HOLD, ST_HOLD, ST_HOLD, ST_HOLD, ST_HOLD, ST_HOLD};
  localparam pcu_state_e NEXT_SAFE_TAB [N_PCU] =
    '{ST_HOLD, ST_PARK, ST_HOLD, ST_HOLD, ST_HOLD, ST_HOLD};

  // Integer PID coefficients, all scaled by 2^PID_SHIFT. With T the sample
  // time, kp the gain, tauD/tauI the derivative/integral times and beta the
  // derivative filter factor, and f = 1/(T + tauD*beta):
  //   a = tauD*beta*f, b = tauD*kp*f, c = T*kp*f, d = T/tauI.
  localparam int unsigned PID_SHIFT = 8;
  typedef struct packed {
    logic signed [15:0] a;
    logic signed [15:0] b;
    logic signed [15:0] c;
    logic signed [15:0] d;
  } pid_gains_t;

  // Gain sets of the two loop-controller algorithms (values of this design,
  // tuned for a motor whose speed follows its PWM command).
  localparam pid_gains_t GAINS_SERVO     = '{a: 16'sd64, b: 16'sd128, c: 16'sd384, d: 16'sd2};
  localparam pid_gains_t GAINS_REGULATOR = '{a: 16'sd64, b: 16'sd128, c: 16'sd256, d: 16'sd4};

  // Absolute value helper.
  function automatic pos_t abs_pos(input pos_t v);
    return (v < 0) ? -v : v;
  endfunction

endpackage
