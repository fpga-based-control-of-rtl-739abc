// Self-checking test of the Init/Terminate sequence: units held in reset with
// outputs off for exactly INIT_CYCLES after run rises, outputs off at once
// when run falls and reset again TERM_CYCLES later, and a second start.
module tb_init_terminate;
  localparam int IC = 37, TC = 21;
  logic clk = 0, rst_n = 0, run = 0, pcu_rst_n, hw_en, active;
  int checks = 0, failures = 0;

  init_terminate #(.INIT_CYCLES(IC), .TERM_CYCLES(TC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) begin
      repeat (5) @(negedge clk);
      check(!pcu_rst_n && !hw_en && !active, "off before run");
      run = 1; n = 0;
      while (!pcu_rst_n && n < 1000) begin @(negedge clk); n++; end
      check(n == IC + 2, $sformatf("init took %0d clocks, expected %0d", n, IC + 2));
      check(hw_en && active, "outputs enabled after init");
      repeat (50) @(negedge clk);
      run = 0; @(negedge clk);
      check(!hw_en && pcu_rst_n, "outputs off at once, units still running");
      n = 1;
      while (pcu_rst_n && n < 1000) begin @(negedge clk); n++; end
      check(n == TC + 2, $sformatf("terminate took %0d clocks, expected %0d", n, TC + 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
