// Block-count test of the production cell: how many blocks the ring can
// carry before it locks up.
//
// The four robots each hold one block; the two belts each hold two (one at
// the output, one behind it). The ring can therefore hold eight blocks. With
// seven blocks there is always one free place, which travels backwards round
// the ring, and the blocks keep moving. With eight every unit holds a block
// and waits for its neighbour to take it: a deadlock. This is the known
// behaviour of the real cell with eight or more blocks.
//
// The test inserts blocks one at a time at the feeder belt's input sensor.
// Seven blocks must keep circulating, with every channel carrying blocks.
// After the eighth, all hand-overs must stop, with every unit offering a
// block and both belts holding a second one. Every hand-over is checked
// against a per-unit queue of tags, so no block is lost, duplicated or
// reordered. Runs at a 10x shorter sample period than the default, with the
// motor models scaled to match.
module tb_production_cell_blocks;
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
  // Per-unit queues of the tags each unit holds, oldest first.
  blk_t held [N_PCU][$];
  int   n_xfer [N_PCU];
  int   n_blocks = 0, n_bad = 0;
  blk_t ins_q = '0;
  logic [2:0]       uq   [N_PCU];
  logic [3:0]       nbuf [N_PCU];
  pcu_state_e       ust  [N_PCU];
  for (genvar i = 0; i < N_PCU; i++) begin : g_mon
    assign uq[i]   = dut.g_pcu[i].u_pcu.u_ctrl.u_seq.q;
    assign nbuf[i] = dut.g_pcu[i].u_pcu.u_ctrl.u_seq.nbuf;
    assign ust[i]  = dut.g_pcu[i].u_pcu.to_ctrl;
  end
  initial for (int i = 0; i < N_PCU; i++) n_xfer[i] = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N_PCU; i++) begin
      if (dut.hs_req[i] && dut.hs_ack[i]) begin
        n_xfer[i]++;
        if (held[i].size() == 0 || held[i][0] != dut.hs_blk[i]) begin
          n_bad++;
          $display("FAIL: unit %0d passed tag %0d out of turn", i, dut.hs_blk[i]);
        end else begin
          void'(held[i].pop_front());
        end
        held[(i + 1) % N_PCU].push_back(dut.hs_blk[i]);
      end
    end
    ins_q <= dut.g_pcu[0].u_pcu.u_ctrl.u_seq.ins_cnt;
    if (dut.g_pcu[0].u_pcu.u_ctrl.u_seq.ins_cnt != ins_q) begin
      n_blocks++;
      held[0].push_back(dut.g_pcu[0].u_pcu.u_ctrl.u_seq.ins_cnt);
    end
  end

  function automatic int total_xfers();
    int s = 0;
    for (int i = 0; i < N_PCU; i++) s += n_xfer[i];
    return s;
  endfunction

  // Present one block at the input sensor until the feeder belt takes it.
  task automatic insert_block(output bit ok);
    int n0 = n_blocks;
    ok = 0;
    blk_sensor[0] = 1;
    for (int t = 0; t < 3000 * DIV && !ok; t++) begin
      @(negedge clk);
      ok = (n_blocks != n0);
    end
    blk_sensor[0] = 0;
    repeat (10) @(negedge clk);         // the block leaves the sensor
  endtask

  // ---------------------------------------------------------------- sequence
  bit ok, all_run, stopped;
  int x0, settle;
  int base [N_PCU];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    while (!active) @(negedge clk);
    all_run = 0;
    for (int t = 0; t < 600 && !all_run; t++) begin
      repeat (DIV) @(negedge clk);
      all_run = 1;
      for (int u = 0; u < N_PCU; u++) if (ust[u] != ST_RUN) all_run = 0;
    end
    check(all_run, "all units homed and running");

    // seven blocks: the ring keeps moving
    for (int b = 1; b <= 7; b++) begin
      insert_block(ok);
      check(ok, $sformatf("block %0d inserted", b));
      if (!ok) begin
        for (int u = 0; u < N_PCU; u++)
          $display("unit %0d: q=%0d nbuf=%0d held=%0d state=%0d xfers=%0d", u, uq[u], nbuf[u], held[u].size(), ust[u], n_xfer[u]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    repeat (400 * DIV) @(negedge clk);
    for (int i = 0; i < N_PCU; i++) base[i] = n_xfer[i];
    repeat (1500 * DIV) @(negedge clk);
    for (int i = 0; i < N_PCU; i++)
      check(n_xfer[i] - base[i] >= 3,
            $sformatf("7 blocks: channel %0d keeps moving (%0d hand-overs)", i, n_xfer[i] - base[i]));
    check(n_blocks == 7, $sformatf("7 blocks in the ring (%0d)", n_blocks));

    // the eighth block: every place is taken and the ring locks up
    insert_block(ok);
    check(ok, "block 8 inserted");
    stopped = 0;
    for (settle = 0; settle < 3000 && !stopped; settle += 100) begin
      x0 = total_xfers();
      repeat (100 * DIV) @(negedge clk);
      stopped = (total_xfers() == x0);
    end
    check(stopped, $sformatf("8 blocks: hand-overs stop (after about %0d ticks)", settle));
    for (int u = 0; u < N_PCU; u++) begin
      check(uq[u] == 3'd4, $sformatf("unit %0d waits to hand on its block", u));
      check(held[u].size() == BUF_DEPTH_TAB[u],
            $sformatf("unit %0d holds %0d blocks, capacity %0d", u, held[u].size(), BUF_DEPTH_TAB[u]));
      check(32'(nbuf[u]) == BUF_DEPTH_TAB[u] - 1, $sformatf("unit %0d buffer level %0d", u, nbuf[u]));
    end
    check(n_bad == 0, $sformatf("no block lost or reordered (%0d errors)", n_bad));
    $display("blocks: inserted=%0d hand-overs=%0d deadlock=%0d", n_blocks, total_xfers(), stopped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
