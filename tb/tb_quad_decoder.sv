// Self-checking test of the quadrature encoder interface: random forward and
// backward steps are driven as Gray code and the count is compared with a
// reference count; also checks clear, enable, the two-step glitch flag and
// that leaving reset with both channels high is neither a step nor a glitch.
module tb_quad_decoder;
  logic clk = 0, rst_n = 0, en = 1, clr = 0, a = 0, b = 0;
  logic signed [31:0] pos;
  logic glitch;
  int checks = 0, failures = 0, ref_pos = 0, glitches = 0;

  quad_decoder #(.POS_W(32)) dut (.clk, .rst_n, .en, .clr, .enc_a(a), .enc_b(b), .pos, .glitch);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && glitch) glitches++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive(input int p);
    unique case (p & 3)
      0: {a, b} = 2'b00;
      1: {a, b} = 2'b10;
      2: {a, b} = 2'b11;
      default: {a, b} = 2'b01;
    endcase
  endtask

  int phase = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int dir;
      dir = ($urandom % 3 == 0) ? -1 : 1;
      phase += dir; ref_pos += dir;
      @(negedge clk) drive(phase);
      repeat (1 + $urandom % 4) @(posedge clk);
      if (i % 100 == 99) begin
        repeat (4) @(posedge clk);
        check(pos == ref_pos, $sformatf("count %0d expected %0d", pos, ref_pos));
      end
    end
    // disabled: steps are not counted
    repeat (4) @(posedge clk);
    check(glitches == 0, "no glitch during normal stepping");
    en = 0;
    for (int i = 0; i < 10; i++) begin phase++; @(negedge clk) drive(phase); repeat (3) @(posedge clk); end
    repeat (4) @(posedge clk);
    en = 1;
    repeat (4) @(posedge clk);
    check(pos == ref_pos, $sformatf("count must hold while disabled: %0d vs %0d", pos, ref_pos));
    // glitch: both channels change at once
    glitches = 0;
    phase += 2;
    @(negedge clk) drive(phase);
    repeat (5) @(posedge clk);
    check(glitches == 1, $sformatf("one glitch expected, saw %0d", glitches));
    check(pos == ref_pos, "a glitch must not change the count");
    // clear
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    check(pos == 0, "clear zeroes the count");
    // reset with both channels high: the synchroniser filling up is no step
    @(negedge clk) rst_n = 0; {a, b} = 2'b11;
    repeat (2) @(posedge clk);
    glitches = 0;
    @(negedge clk) rst_n = 1;
    repeat (6) @(posedge clk);
    check(glitches == 0 && pos == 0, $sformatf("start-up with A=B=1: glitches %0d count %0d", glitches, pos));
    // latency: edge to count in three clocks
    phase++;
    @(negedge clk) drive(phase);
    @(posedge clk); @(posedge clk); #1;
    check(pos == 0, "count not yet updated after two clocks");
    @(posedge clk); #1;
    check(pos == 1, "count updated three clocks after the edge");
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
