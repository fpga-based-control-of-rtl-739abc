// End-to-end test of the production cell controller with six behavioural
// axes. Runs at a 10x shorter sample period than the default so that several
// rounds fit in a short simulation; the motor models are scaled to match.
//
// Sequence: Init, homing of all six units, two blocks inserted at the feeder
// belt and carried round the ring (every hand-over is checked for the right
// tag and order), a jammed feeder (feeder SAFE, feeder belt HOLD, molder door
// PARK, i.e. opened), recovery by a host command, a user HOLD on the
// extractor, and Terminate. Every mechanism is counted and must occur.
module tb_production_cell_top;
  import pcu_pkg::*;
  localparam int DIV = 5000, K = 39;
  logic clk = 0, rst_n = 0, run = 0, active;
  logic [N_PCU-1:0] enc_a, enc_b, blk_sensor = '0, pwm, pwm_dir, magnet, stuck = '0;
  logic [1:0] endsw [N_PCU];
  logic host_sel = 0, host_wr = 0, host_rvalid;
  logic [2:0] host_pcu = 0, host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int mpos [N_PCU];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N_PCU; i++) begin : g_ax
    tb_motor_model #(.CLK_PER_COUNT(K), .START_POS(150 + 40 * i)) m (
      .clk, .pwm(pwm[i]), .pwm_dir(pwm_dir[i]), .stuck(stuck[i]),
      .enc_a(enc_a[i]), .enc_b(enc_b[i]), .endsw(endsw[i]), .pos(mpos[i]));
  end

  production_cell_top #(.SAMPLE_DIV(DIV), .INIT_CYCLES(100)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_xfer [N_PCU];            // hand-overs on channel i (unit i -> i+1)
  int n_homed = 0, n_insert = 0, n_magnet = 0, n_safe = 0, n_hold = 0, n_park = 0;
  int n_override = 0, n_init = 0, n_term = 0;
  blk_t last_tag [N_PCU];
  blk_t held_tag [N_PCU][$];     // tags each unit holds, oldest first
  logic [N_PCU-1:0] magnet_q = '0;
  logic active_q = 0;
  initial for (int i = 0; i < N_PCU; i++) begin n_xfer[i] = 0; last_tag[i] = 0; end

  always @(posedge clk) if (rst_n) begin
    active_q <= active;
    magnet_q <= magnet;
    if (active && !active_q) n_init++;
    if (!active && active_q) n_term++;
    for (int i = 0; i < N_PCU; i++) begin
      if (dut.hs_req[i] && dut.hs_ack[i]) begin
        n_xfer[i]++;
        last_tag[i] = dut.hs_blk[i];
        if (held_tag[i].size() == 0 || dut.hs_blk[i] != held_tag[i][0])
          begin checks++; failures++; $display("FAIL: unit %0d passed tag %0d out of turn", i, dut.hs_blk[i]); end
        else void'(held_tag[i].pop_front());
        held_tag[(i + 1) % N_PCU].push_back(dut.hs_blk[i]);
      end
      if (magnet[i] && !magnet_q[i]) n_magnet++;
    end
    if (dut.g_pcu[0].u_pcu.u_ctrl.u_seq.sens_take) begin
      n_insert++;
      held_tag[0].push_back(dut.g_pcu[0].u_pcu.u_ctrl.u_seq.in_blk);
    end
  end

  // ---------------------------------------------------------------- host access
  task automatic host_read(input int u, input int a, output logic [31:0] d);
    @(negedge clk) begin host_sel = 1; host_wr = 0; host_pcu = 3'(u); host_addr = 3'(a); end
    @(negedge clk) host_sel = 0;
    check(host_rvalid, "host read answered");
    d = host_rdata;
  endtask
  task automatic host_write(input int u, input int a, input logic [31:0] d);
    @(negedge clk) begin host_sel = 1; host_wr = 1; host_pcu = 3'(u); host_addr = 3'(a); host_wdata = d; end
    @(negedge clk) begin host_sel = 0; host_wr = 0; end
  endtask
  pcu_state_e ustate [N_PCU];
  for (genvar i = 0; i < N_PCU; i++) begin : g_st
    assign ustate[i] = dut.g_pcu[i].u_pcu.to_ctrl;
  end
  function automatic pcu_state_e st(input int u);
    return ustate[u];
  endfunction
  // Wait until unit u's state (as read by the host) is s.
  task automatic wait_state(input int u, input pcu_state_e s, input int max_ticks, output bit ok);
    logic [31:0] d;
    ok = 0;
    for (int n = 0; n < max_ticks; n++) begin
      host_read(u, 0, d);
      if (d == 32'(s)) begin ok = 1; break; end
      repeat (DIV) @(negedge clk);
    end
  endtask
  task automatic insert_block();
    int n0 = n_insert;
    blk_sensor[0] = 1;
    while (n_insert == n0) @(negedge clk);
    blk_sensor[0] = 0;
  endtask

  // ---------------------------------------------------------------- sequence
  bit ok;
  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(!active && pwm == 0 && magnet == 0, "all off before run");
    run = 1;
    while (!active) @(negedge clk);
    for (int u = 0; u < N_PCU; u++) begin
      wait_state(u, ST_RUN, 400, ok);
      check(ok, $sformatf("unit %0d homed and running", u));
      if (ok) n_homed++;
      host_read(u, 1, d);
      check($signed(d) >= POS0_TAB[u] - 8 && $signed(d) <= POS0_TAB[u] + 8, $sformatf("unit %0d at rest (%0d)", u, $signed(d)));
    end
    // two blocks: one round each
    insert_block();
    while (n_xfer[0] < 1) @(negedge clk);
    repeat (20 * DIV) @(negedge clk);
    insert_block();
    while (n_xfer[N_PCU-1] < 2) @(negedge clk);
    for (int i = 0; i < N_PCU; i++)
      check(n_xfer[i] >= 2, $sformatf("channel %0d carried both blocks (%0d)", i, n_xfer[i]));
    check(last_tag[N_PCU-1] == 8'd2, "block 2 came round after block 1");
    // jam the feeder while it pushes a block
    while (dut.g_pcu[1].u_pcu.u_ctrl.u_seq.q != 3'd3) @(negedge clk);
    repeat (10 * DIV) @(negedge clk);
    stuck[1] = 1;
    wait_state(1, ST_SAFE, 300, ok);
    check(ok, "jammed feeder goes SAFE");
    if (ok) n_safe++;
    repeat (3) @(negedge clk);
    check(st(0) == ST_HOLD, "feeder belt held");
    if (st(0) == ST_HOLD) n_hold++;
    check(st(2) == ST_PARK, "molder door parked");
    repeat (160 * DIV) @(negedge clk);
    host_read(2, 1, d);
    check($signed(d) >= POS1_TAB[2] - 8 && $signed(d) <= POS1_TAB[2] + 8, $sformatf("molder door opened (%0d)", $signed(d)));
    if ($signed(d) >= POS1_TAB[2] - 8) n_park++;
    host_read(1, 3, d);
    check(d[5] == 1'b1, "override flag reported");
    if (d[5]) n_override++;
    check(pwm[1] == 0, "jammed motor switched off");
    // recovery
    stuck[1] = 0;
    host_write(1, 0, 32'(ST_RUN));
    wait_state(1, ST_RUN, 50, ok);
    check(ok, "feeder back to RUN");
    repeat (3) @(negedge clk);
    check(st(0) == ST_RUN && st(2) == ST_RUN, "neighbours released");
    // the block that was in the feeder continues
    begin
      int x;
      x = n_xfer[1];
      while (n_xfer[1] == x) @(negedge clk);
      check(1, "feeder passed its block on after recovery");
    end
    // user HOLD on the extractor
    host_write(3, 0, 32'(ST_HOLD));
    repeat (5) @(negedge clk);
    check(st(3) == ST_HOLD, "user HOLD");
    if (st(3) == ST_HOLD) n_hold++;
    begin
      int x;
      x = n_xfer[2];
      repeat (150 * DIV) @(negedge clk);
      check(n_xfer[2] == x, "extractor takes no block under HOLD");
      host_write(3, 0, 32'(ST_RUN));
      repeat (5) @(negedge clk);
      check(st(3) == ST_RUN, "extractor released");
    end
    repeat (100 * DIV) @(negedge clk);
    // terminate
    run = 0;
    repeat (5) @(negedge clk);
    check(!active && pwm == 0 && magnet == 0, "Terminate switches everything off");
    repeat (200) @(negedge clk);
    // mechanisms
    check(n_init == 1, $sformatf("Init happened (%0d)", n_init));
    check(n_term == 1, $sformatf("Terminate happened (%0d)", n_term));
    check(n_homed == N_PCU, $sformatf("homing of all units (%0d)", n_homed));
    check(n_insert >= 2, $sformatf("sensor insertions (%0d)", n_insert));
    check(n_magnet >= 4, $sformatf("magnet pick-ups (%0d)", n_magnet));
    check(n_safe >= 1, $sformatf("SAFE states (%0d)", n_safe));
    check(n_hold >= 2, $sformatf("HOLD states (%0d)", n_hold));
    check(n_park >= 1, $sformatf("PARK moves (%0d)", n_park));
    check(n_override >= 1, $sformatf("override reports (%0d)", n_override));
    $display("mechanisms: init=%0d term=%0d homed=%0d insert=%0d magnet=%0d safe=%0d hold=%0d park=%0d override=%0d xfers=%0d",
             n_init, n_term, n_homed, n_insert, n_magnet, n_safe, n_hold, n_park, n_override,
             n_xfer[0] + n_xfer[1] + n_xfer[2] + n_xfer[3] + n_xfer[4] + n_xfer[5]);
    $display("run length: %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
