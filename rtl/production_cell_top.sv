// Production cell controller: six PCUs in a ring on one FPGA.
//
// The cell moves blocks around a loop of six robots: feeder belt (0), feeder
// (1), molder door (2), extractor (3), extraction belt (4) and rotation robot
// (5), which puts the block back on the feeder belt. Each robot has its own
// PCU; there is no central supervisor. Neighbouring PCUs are joined by a
// rendezvous channel in the block direction (unit i offers, unit i+1 takes)
// and by an error channel in each direction, so a failing unit can stop the
// unit before it and, for example, have the molder door opened after it.
// The robots hold one block each and the two belts two, so the ring holds
// eight blocks; with eight in it every unit waits for the next and the cell
// locks up, as the real cell does.
//
// Init/Terminate holds all units in reset with outputs off until `run` has
// been high for INIT_CYCLES clocks, and switches the outputs off when `run`
// drops. The host reaches each unit's command registers through one shared
// port: `host_pcu` picks the unit, the rest is that unit's register port.
// The PCI bridge to the host is not part of this design.
//
// Structure (six units, ring of handshake channels, error channels both
// ways) follows the design; the per-unit positions and the host port are
// this implementation's choices.
//
// The reset is also read by the disable condition of a simulation assertion
// (in this block or one below it); lint may report it as used both
// synchronously and asynchronously. All flip-flops use it only as an
// asynchronous reset.
module production_cell_top
  import pcu_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV  = pcu_pkg::CLK_HZ / pcu_pkg::SAMPLE_HZ,
  parameter int unsigned INIT_CYCLES = 1000,
  parameter int          VMAX        = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  output logic              active,
  // production cell I/O, one entry per unit
  input  logic [N_PCU-1:0]  enc_a,
  input  logic [N_PCU-1:0]  enc_b,
  input  logic [1:0]        endsw      [N_PCU],
  input  logic [N_PCU-1:0]  blk_sensor,
  output logic [N_PCU-1:0]  pwm,
  output logic [N_PCU-1:0]  pwm_dir,
  output logic [N_PCU-1:0]  magnet,
  // host register port
  input  logic              host_sel,
  input  logic [2:0]        host_pcu,
  input  logic              host_wr,
  input  logic [2:0]        host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  output logic              host_rvalid
);
  logic pcu_rst_n, hw_en;

  init_terminate #(.INIT_CYCLES(INIT_CYCLES), .TERM_CYCLES(INIT_CYCLES)) u_init (
    .clk, .rst_n, .run, .pcu_rst_n, .hw_en, .active
  );

  // Channel i runs from unit i to unit i+1 (mod N_PCU).
  logic     hs_req [N_PCU];
  logic     hs_ack [N_PCU];
  blk_t     hs_blk [N_PCU];
  err_msg_t err_fwd [N_PCU];   // unit i -> unit i+1
  err_msg_t err_bwd [N_PCU];   // unit i+1 -> unit i
  logic [31:0] rdata [N_PCU];
  logic [N_PCU-1:0] rvalid;

  for (genvar i = 0; i < N_PCU; i++) begin : g_pcu
    localparam int P = (i + N_PCU - 1) % N_PCU;   // channel coming in

    pcu #(
      .SAMPLE_DIV  (SAMPLE_DIV),
      .POS0        (POS0_TAB[i]),
      .POS1        (POS1_TAB[i]),
      .VMAX        (VMAX),
      .SENSOR_START(SENSOR_START_TAB[i]),
      .USE_MAGNET  (MAGNET_TAB[i]),
      .BUF_DEPTH   (BUF_DEPTH_TAB[i]),
      .PREV_SAFE   (PREV_SAFE_TAB[i]),
      .NEXT_SAFE   (NEXT_SAFE_TAB[i])
    ) u_pcu (
      .clk,
      .rst_n       (pcu_rst_n),
      .hw_en,
      .enc_a       (enc_a[i]),
      .enc_b       (enc_b[i]),
      .endsw       (endsw[i]),
      .blk_sensor  (blk_sensor[i]),
      .pwm         (pwm[i]),
      .pwm_dir     (pwm_dir[i]),
      .magnet      (magnet[i]),
      .prev_req    (hs_req[P]),
      .prev_blk    (hs_blk[P]),
      .prev_ack    (hs_ack[P]),
      .next_req    (hs_req[i]),
      .next_blk    (hs_blk[i]),
      .next_ack    (hs_ack[i]),
      .prev_err_in (err_fwd[P]),
      .next_err_in (err_bwd[i]),
      .prev_err_out(err_bwd[P]),
      .next_err_out(err_fwd[i]),
      .host_sel    (host_sel && host_pcu == 3'(i)),
      .host_wr,
      .host_addr,
      .host_wdata,
      .host_rdata  (rdata[i]),
      .host_rvalid (rvalid[i])
    );
  end

  always_comb begin
    host_rdata = '0;
    for (int i = 0; i < N_PCU; i++)
      if (rvalid[i]) host_rdata = rdata[i];
  end
  assign host_rvalid = |rvalid;
endmodule
