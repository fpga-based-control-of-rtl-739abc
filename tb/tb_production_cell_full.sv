// Full-size run of the production cell controller, every parameter at its
// default (50 MHz clock, 1 kHz loop sample rate, six units). Behavioural axes
// are scaled so that a full PWM command moves about 128 encoder counts per
// millisecond. One complete operation: Init, homing of all units, one block
// inserted at the feeder belt and carried once round the ring back to the
// feeder belt. Also checks the sample period (50 000 clocks = 1 ms) and that
// every loop calculation finishes within its sample period.
module tb_production_cell_full;
  import pcu_pkg::*;
  localparam int K = 390;
  logic clk = 0, rst_n = 0, run = 0, active;
  logic [N_PCU-1:0] enc_a, enc_b, blk_sensor = '0, pwm, pwm_dir, magnet;
  logic [1:0] endsw [N_PCU];
  logic host_sel = 0, host_wr = 0, host_rvalid;
  logic [2:0] host_pcu = 0, host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int mpos [N_PCU];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N_PCU; i++) begin : g_ax
    tb_motor_model #(.CLK_PER_COUNT(K), .START_POS(150 + 40 * i)) m (
      .clk, .pwm(pwm[i]), .pwm_dir(pwm_dir[i]), .stuck(1'b0),
      .enc_a(enc_a[i]), .enc_b(enc_b[i]), .endsw(endsw[i]), .pos(mpos[i]));
  end

  production_cell_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // hand-overs and their tags
  int n_xfer [N_PCU];
  blk_t last_tag [N_PCU];
  initial for (int i = 0; i < N_PCU; i++) begin n_xfer[i] = 0; last_tag[i] = 0; end
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N_PCU; i++)
      if (dut.hs_req[i] && dut.hs_ack[i]) begin
        n_xfer[i]++;
        last_tag[i] = dut.hs_blk[i];
      end

  // sample period and PID completion of unit 0
  longint cyc = 0, last_tick = -1;
  int n_ticks = 0, bad_period = 0, pid_late = 0, since_tick = 0;
  always @(posedge clk) begin
    cyc++;
    if (active && dut.g_pcu[0].u_pcu.tick) begin
      if (last_tick >= 0 && cyc - last_tick != 50_000) bad_period++;
      last_tick = cyc;
      n_ticks++;
      since_tick = 0;
    end else since_tick++;
    if (dut.g_pcu[0].u_pcu.u_ctrl.u_loop.pid_done && since_tick > 10) pid_late++;
  end

  pcu_state_e ustate [N_PCU];
  for (genvar i = 0; i < N_PCU; i++) begin : g_st
    assign ustate[i] = dut.g_pcu[i].u_pcu.to_ctrl;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    while (!active) @(negedge clk);
    begin
      static int n = 0;
      bit all_run;
      do begin
        repeat (1000) @(negedge clk);
        all_run = 1;
        for (int u = 0; u < N_PCU; u++) if (ustate[u] != ST_RUN) all_run = 0;
        n++;
      end while (!all_run && n < 20_000);
      check(all_run, "all units homed and running");
    end
    for (int u = 0; u < N_PCU; u++) begin
      @(negedge clk) begin host_sel = 1; host_wr = 0; host_pcu = 3'(u); host_addr = 3'd1; end
      @(negedge clk) host_sel = 0;
      check($signed(host_rdata) >= POS0_TAB[u] - 8 && $signed(host_rdata) <= POS0_TAB[u] + 8,
            $sformatf("unit %0d at its rest position (%0d)", u, $signed(host_rdata)));
    end
    blk_sensor[0] = 1;
    while (dut.g_pcu[0].u_pcu.u_ctrl.u_seq.q != 3'd3) @(negedge clk);
    blk_sensor[0] = 0;
    while (n_xfer[N_PCU-1] < 1) @(negedge clk);
    for (int i = 0; i < N_PCU; i++) begin
      check(n_xfer[i] == 1, $sformatf("channel %0d: one hand-over (%0d)", i, n_xfer[i]));
      check(last_tag[i] == 8'd1, $sformatf("channel %0d carried tag %0d", i, last_tag[i]));
    end
    check(bad_period == 0 && n_ticks > 100, $sformatf("sample period 50000 clocks (%0d ticks, %0d wrong)", n_ticks, bad_period));
    check(pid_late == 0, "loop calculation done within 10 clocks of the sample tick");
    $display("one round took %0d ms of simulated time", n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
