// Self-checking test of the PWM generator: for a set of signed commands the
// number of high clocks per period and the direction bit are compared with
// |duty| and sign(duty); also checks the period length and the enable.
module tb_pwm_gen;
  localparam int W = 12, PER = 1 << (W - 1);
  logic clk = 0, rst_n = 0, en = 1;
  logic signed [W-1:0] duty = '0;
  logic pwm, dir, period_start;
  int checks = 0, failures = 0;

  pwm_gen #(.PWM_W(W)) dut (.clk, .rst_n, .en, .duty, .pwm, .dir, .period_start);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Count high clocks over one full period, starting at a period boundary.
  task automatic measure(input int d);
    int hi, n, expect_hi;
    @(negedge clk) duty = W'(d);
    // let the new command be taken at the next boundary, then skip one period
    do begin @(posedge clk); #1; end while (!period_start);
    do begin @(posedge clk); #1; end while (!period_start);
    hi = 0; n = 0;
    do begin
      @(posedge clk); #1;
      if (pwm) hi++;
      n++;
    end while (!period_start);
    expect_hi = (d < 0) ? -d : d;
    if (expect_hi > PER) expect_hi = PER;
    check(n == PER, $sformatf("period %0d expected %0d", n, PER));
    check(hi == expect_hi, $sformatf("duty %0d: %0d high clocks", d, hi));
    check(dir == (d < 0), $sformatf("duty %0d: dir %0b", d, dir));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(0);
    measure(1);
    measure(100);
    measure(-100);
    measure(1024);
    measure(2047);
    measure(-2048);
    for (int i = 0; i < 6; i++) measure(int'($urandom % 4096) - 2048);
    @(negedge clk) duty = 12'sd2000; en = 0;
    repeat (3 * PER) begin @(posedge clk); #1; if (pwm) begin check(0, "pwm while disabled"); break; end end
    check(1, "disable holds pwm low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
