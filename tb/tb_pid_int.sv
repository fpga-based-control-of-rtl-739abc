// Self-checking test of the integer PID: random setpoint/position samples are
// fed to the block and to a reference model of the recurrence
//   uD = (a*uD' + b*(e-e') + c*e) >>> 8, UI = UI' + d*uD, u = (UI >>> 8) + uD
// with the documented clamps. Output values, the 5-clock latency and the
// history clear are checked.
module tb_pid_int;
  import pcu_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, start = 0;
  pid_gains_t gains;
  logic signed [31:0] sp = 0, pos = 0;
  logic signed [11:0] out;
  logic signed [19:0] err;
  logic busy, done;
  int checks = 0, failures = 0;

  pid_int dut (.clk, .rst_n, .clear, .start, .gains, .setpoint(sp), .pos, .out, .err, .busy, .done);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint m_ud = 0, m_ui = 0, m_e = 0;
  function automatic longint lim(longint v, longint l);
    return v > l ? l : (v < -l ? -l : v);
  endfunction
  function automatic int model(longint e_in);
    longint e, ud, ui;
    e  = lim(e_in, (1 << 19) - 1);
    ud = lim((longint'(gains.a) * m_ud + longint'(gains.b) * (e - m_e) + longint'(gains.c) * e) >>> 8, 1 << 20);
    ui = lim(m_ui + longint'(gains.d) * ud, 2047 * 256);
    m_e = e; m_ud = ud; m_ui = ui;
    return int'(lim((ui >>> 8) + ud, 2047));
  endfunction

  task automatic sample(input int s, input int p);
    int lat, expv;
    @(negedge clk);
    sp = s; pos = p; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    expv = model(longint'(s) - longint'(p));
    check(lat == 5, $sformatf("latency %0d, expected 5", lat));
    check(out == 12'(expv), $sformatf("out %0d expected %0d (e=%0d)", out, expv, s - p));
  endtask

  initial begin
    gains = '{a: 16'sd64, b: 16'sd128, c: 16'sd384, d: 16'sd2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++)
      sample(int'($urandom % 400) - 200, int'($urandom % 400) - 200);
    // large errors reach the clamps
    sample(1000000, 0);
    sample(-1000000, 0);
    gains = '{a: 16'sd0, b: 16'sd0, c: 16'sd256, d: 16'sd16};
    for (int i = 0; i < 100; i++)
      sample(int'($urandom % 2000) - 1000, 0);
    // clear resets the history
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    m_ud = 0; m_ui = 0; m_e = 0;
    check(out == 0, "output cleared");
    sample(100, 0);
    // closed loop on an integrator plant converges to the setpoint
    gains = '{a: 16'sd64, b: 16'sd128, c: 16'sd256, d: 16'sd4};
    begin
      int p = 0;
      for (int k = 0; k < 300; k++) begin
        sample(500, p);
        p += out / 16;
      end
      check(p > 490 && p < 510, $sformatf("closed loop settled at %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
