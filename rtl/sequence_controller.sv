// Sequence controller of one PCU.
//
// Decides which movement the unit makes next. After start-up it asks for the
// homing profile, then for the rest position, and reports ST_RUN on
// `state_out`. From then on one block at a time goes through the unit:
//   idle   - wait at the rest position; accept a block offered by the
//            previous unit (rendezvous on prev_req/prev_ack) or, when
//            SENSOR_START is set, a block found at the input sensor;
//   work   - switch the magnet on (USE_MAGNET) and move to the work position;
//   give   - offer the block to the next unit (next_req held until next_ack);
//   back   - magnet off, return to the rest position, count the block.
// A unit with BUF_DEPTH > 1 (a belt) also accepts blocks while it is busy,
// up to BUF_DEPTH - 1 of them, and keeps their tags in order; when it comes
// back from a hand-over it starts at once with the oldest waiting block. A
// block at the input sensor (SENSOR_START) goes before a block offered by the
// previous unit, which then waits for the next free place. A block at the
// sensor counts once, on the sensor's rising edge, and waits until taken.
// Blocks are accepted only in ST_RUN; in any other state the controller
// waits, and an interrupted move is completed once the setpoint generator
// serves it again. When the unit returns to ST_RUN while idle it first moves
// back to its rest position, since an override may have moved it.
//
// Rendezvous channels: a transfer happens in the clock cycle where req and
// ack are both high; the offerer holds req and the tag stable until then. The
// receiving unit only acknowledges while idle at its rest position, which is
// its answer to "are you home?".
//
// The roles (sensor input, rendezvous with the neighbours, driving the
// setpoint generator) and the belts' ability to hold more than one block
// follow the design; the single generic four-step sequence used for all six
// units, the buffer depth and the sensor-first rule are choices of this
// implementation.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module sequence_controller
  import pcu_pkg::*;
#(
  parameter bit SENSOR_START = 1'b0,
  parameter bit USE_MAGNET   = 1'b0,
  parameter int BUF_DEPTH    = 1     // blocks the unit can hold (belts: 2)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pcu_state_e state_in,
  output pcu_state_e state_out,
  // rendezvous with the previous unit (receiver side)
  input  logic       prev_req,
  input  blk_t       prev_blk,
  output logic       prev_ack,
  // rendezvous with the next unit (sender side)
  output logic       next_req,
  output blk_t       next_blk,
  input  logic       next_ack,
  // hardware
  input  logic       blk_sensor,
  output logic       magnet_cmd,
  // setpoint generator
  output sp_req_e    sp_req,
  input  logic       sp_ready,
  // status
  output logic [15:0] blocks_done,
  output logic        busy
);
  typedef enum logic [2:0] {Q_HOME, Q_REST, Q_IDLE, Q_WORK, Q_GIVE, Q_BACK} seq_state_e;

  seq_state_e q;
  pcu_state_e state_q;
  blk_t       blk;
  blk_t       ins_cnt;
  logic       run;

  // Blocks waiting behind the one being carried (belts only).
  localparam int SPARE = (BUF_DEPTH > 1) ? BUF_DEPTH - 1 : 1;
  localparam int IW    = (SPARE > 1) ? $clog2(SPARE) : 1;
  blk_t       fifo [SPARE];
  logic       sens_q, sens_pend;  // a new block arrived at the input sensor
  logic [3:0] nbuf;
  logic       room, back_done, sens_take, take_in, take_now, push, pop;
  blk_t       in_blk;

  assign run       = (state_in == ST_RUN);
  assign room      = (BUF_DEPTH > 1) && (q == Q_WORK || q == Q_GIVE || q == Q_BACK) &&
                     (32'(nbuf) < BUF_DEPTH - 1);
  assign sens_take = SENSOR_START && sens_pend && ((q == Q_IDLE) || room) &&
                     run && (state_q == ST_RUN);
  assign prev_ack  = ((q == Q_IDLE) || room) && run && (state_q == ST_RUN) && prev_req &&
                     !sens_take;
  assign back_done = (q == Q_BACK) && sp_ready;
  // A block enters from the input sensor (a block placed there by hand goes
  // first) or from the previous unit. It is taken straight into the unit when
  // the unit is (or is about to be) empty; otherwise it waits in the buffer.
  assign take_in   = prev_ack || sens_take;
  assign in_blk    = prev_ack ? prev_blk : ins_cnt + 1'b1;
  assign take_now  = take_in && ((q == Q_IDLE) || (back_done && nbuf == '0));
  assign push      = take_in && !take_now;
  assign pop       = back_done && (nbuf != '0);
  assign next_req = (q == Q_GIVE);
  assign next_blk = blk;
  assign busy     = (q != Q_IDLE);

  always_comb begin
    unique case (q)
      Q_HOME:         sp_req = REQ_HOME;
      Q_REST, Q_BACK: sp_req = REQ_POS0;
      Q_WORK:         sp_req = REQ_POS1;
      default:        sp_req = REQ_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q           <= Q_HOME;
      state_q     <= ST_HOMING;
      state_out   <= ST_HOMING;
      blk         <= '0;
      ins_cnt     <= '0;
      magnet_cmd  <= 1'b0;
      blocks_done <= '0;
      nbuf        <= '0;
      fifo        <= '{default: '0};
      sens_q      <= 1'b0;
      sens_pend   <= 1'b0;
    end else begin
      if (pop) begin
        for (int i = 0; i < SPARE - 1; i++) fifo[i] <= fifo[i+1];
        if (push) fifo[IW'(nbuf - 1'b1)] <= in_blk;
      end else if (push) begin
        fifo[IW'(nbuf)] <= in_blk;
      end
      // A block at the sensor is one arrival (rising edge), kept until taken.
      sens_q    <= blk_sensor;
      sens_pend <= (sens_pend && !sens_take) || (blk_sensor && !sens_q);
      if (sens_take) ins_cnt <= ins_cnt + 1'b1;
      nbuf <= nbuf + 4'(push) - 4'(pop);
      state_q <= state_in;
      unique case (q)
        Q_HOME: if (sp_ready) q <= Q_REST;
        Q_REST: if (sp_ready) begin
          q         <= Q_IDLE;
          state_out <= ST_RUN;
        end
        Q_IDLE: begin
          if (run && state_q != ST_RUN) begin
            q <= Q_REST;                    // back from an override
          end else if (take_now) begin
            blk        <= in_blk;
            magnet_cmd <= USE_MAGNET;
            q          <= Q_WORK;
          end
        end
        Q_WORK: if (sp_ready) q <= Q_GIVE;
        Q_GIVE: if (next_ack) begin
          magnet_cmd <= 1'b0;
          q          <= Q_BACK;
        end
        Q_BACK: if (sp_ready) begin
          blocks_done <= blocks_done + 1'b1;
          if (pop || take_now) begin        // next block already waiting
            blk        <= pop ? fifo[0] : in_blk;
            magnet_cmd <= USE_MAGNET;
            q          <= Q_WORK;
          end else begin
            q <= Q_IDLE;
          end
        end
        default: q <= Q_HOME;
      endcase
    end
  end

  // The offer stays up, with a stable tag, until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   next_req && !next_ack |=> next_req && $stable(next_blk))
    else $error("sequence_controller: offer withdrawn");
endmodule
