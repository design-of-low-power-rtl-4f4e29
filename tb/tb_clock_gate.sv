// tb_clock_gate: checks the latch-based clock gate.
//
// The enable is changed at random times in both clock phases.  A reference
// samples the enable at every rising edge of clk as the latch would hold it
// (its value at the end of the low phase) and counts the gated pulses it
// expects; every rising and falling edge of gclk is checked against it, and
// the enable toggling during the high phase must neither start nor cut a
// pulse.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  logic en_at_rise;
  int checks = 0, failures = 0;
  int exp_pulses = 0, got_pulses = 0;

  clock_gate dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  always @(posedge gclk) got_pulses++;

  initial begin
    @(negedge clk);
    repeat (400) begin
      #($urandom_range(1, 3)) en = 1'($urandom);   // low phase: takes effect
      @(posedge clk);
      en_at_rise = en;
      #1;
      check("gclk follows the latched enable", gclk, en_at_rise);
      if (en_at_rise) exp_pulses++;
      #($urandom_range(1, 2)) en = 1'($urandom);   // high phase: must be ignored
      #1 check("no glitch in the high phase", gclk, en_at_rise);
      @(negedge clk);
      #1 check("gclk low while clk low", gclk, 1'b0);
    end
    checks++;
    if (got_pulses != exp_pulses) begin
      failures++;
      $display("FAIL pulse count %0d expected %0d", got_pulses, exp_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
