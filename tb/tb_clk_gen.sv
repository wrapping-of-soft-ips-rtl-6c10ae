// tb_clk_gen: self-checking test of clk_gen.
// en is driven from rising-edge logic with a random pattern, as the control logic drives
// it. Checks: at every rising clk edge, gclk is high exactly when en was high during the
// previous cycle; the total number of gclk pulses equals the number of enabled cycles;
// every gclk rising edge coincides with a rising clk edge (no glitches or half pulses);
// gclk is never high while clk is low.
module tb_clk_gen;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gclk_edges = 0, expected = 0, glitches = 0;
  logic en_prev = 0;

  clk_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge gclk) begin
    gclk_edges++;
    if (!(clk === 1'b1 && $time % 10 == 5)) glitches++;
  end
  always @(negedge clk) #1 if (gclk) glitches++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    en <= 0;
    @(posedge clk);            // en_q now settled low
    gclk_edges = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // en changes just after this rising edge, as from rising-edge logic
      en_prev = ($urandom_range(99) < 40);
      en <= en_prev;
      @(posedge clk);
      #1;
      check(gclk == en_prev, "gclk pulse at the edge after en was set");
      if (en_prev) expected++;
    end
    en <= 0;
    repeat (2) @(posedge clk);
    check(gclk_edges == expected, "pulse count");
    check(glitches == 0, "no glitches");
    $display("gclk pulses=%0d expected=%0d glitches=%0d", gclk_edges, expected, glitches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
