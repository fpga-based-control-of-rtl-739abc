// Init and Terminate sequence of the production cell.
//
// Brings the hardware into a known state before the units start and again
// after they stop. `run` high starts Init: the units stay in reset and the
// motor and magnet outputs stay off for INIT_CYCLES clocks, then the units
// are released (`pcu_rst_n` high) and the outputs enabled (`hw_en`). `run`
// low starts Terminate: the outputs are switched off at once, and after
// TERM_CYCLES clocks the units are put back in reset. `pcu_rst_n` is a
// registered signal, safe to use as the units' asynchronous reset.
//
// That Init runs before the units and Terminate after them follows the
// design; the durations and the run input are choices of this
// implementation.
module init_terminate #(
  parameter int unsigned INIT_CYCLES = 1000,
  parameter int unsigned TERM_CYCLES = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic pcu_rst_n,
  output logic hw_en,
  output logic active
);
  typedef enum logic [1:0] {P_OFF, P_INIT, P_RUN, P_TERM} phase_e;
  localparam int unsigned CW = $clog2((INIT_CYCLES > TERM_CYCLES ? INIT_CYCLES : TERM_CYCLES) + 1);

  phase_e        ph;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph        <= P_OFF;
      cnt       <= '0;
      pcu_rst_n <= 1'b0;
      hw_en     <= 1'b0;
    end else begin
      unique case (ph)
        P_OFF: if (run) begin
          ph  <= P_INIT;
          cnt <= CW'(INIT_CYCLES);
        end
        P_INIT: begin
          if (!run) begin
            ph <= P_OFF;
          end else if (cnt == '0) begin
            ph        <= P_RUN;
            pcu_rst_n <= 1'b1;
            hw_en     <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        P_RUN: if (!run) begin
          ph    <= P_TERM;
          hw_en <= 1'b0;
          cnt   <= CW'(TERM_CYCLES);
        end
        P_TERM: begin
          if (cnt == '0) begin
            ph        <= P_OFF;
            pcu_rst_n <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: ph <= P_OFF;
      endcase
    end
  end

  assign active = (ph == P_RUN);
endmodule
