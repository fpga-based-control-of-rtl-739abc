// Command process of one PCU: the user-interface side of the unit.
//
// A small register port through which a host reads the unit's status and
// commands its state. A write or read is one clock with `sel` high; read data
// is registered and valid, with `rvalid`, one clock after the read.
//
//   addr  read                                   write
//   0     state sent to the controller (3 bits)  setState (wdata[2:0])
//   1     measured position
//   2     present setpoint
//   3     {override, loop mode[1:0], exception[2:0]} in bits [5:0]
//   4     blocks passed on by this unit
//   5     motor command (sign-extended)
//   6-7   zero
//
// A setState write is forwarded as a one-clock `set_valid` pulse. The role
// (status requests and state commands from the host) follows the design;
// the register map is a choice of this implementation.
module command
  import pcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host register port
  input  logic        sel,
  input  logic        wr,
  input  logic [2:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  // to the state handler
  output logic        set_valid,
  output pcu_state_e  set_state,
  // status
  input  pcu_state_e  cur_state,
  input  pos_t        pos,
  input  pos_t        setpoint,
  input  logic        ovr_active,
  input  loop_mode_e  mode,
  input  exc_code_e   exc,
  input  logic [15:0] blocks_done,
  input  pwm_t        pwm_cmd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata     <= '0;
      rvalid    <= 1'b0;
      set_valid <= 1'b0;
      set_state <= ST_RUN;
    end else begin
      rvalid    <= sel && !wr;
      set_valid <= sel && wr && addr == 3'd0;
      if (sel && wr && addr == 3'd0)
        set_state <= pcu_state_e'(wdata[2:0]);
      if (sel && !wr) begin
        unique case (addr)
          3'd0:    rdata <= 32'(cur_state);
          3'd1:    rdata <= 32'(pos);
          3'd2:    rdata <= 32'(setpoint);
          3'd3:    rdata <= {26'd0, ovr_active, mode, exc};
          3'd4:    rdata <= {16'd0, blocks_done};
          3'd5:    rdata <= 32'(pwm_cmd);
          default: rdata <= '0;
        endcase
      end
    end
  end
endmodule
