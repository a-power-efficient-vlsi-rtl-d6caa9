// tb_bhm_clock_gate: test of the latch-based clock gate.
//
// EN changes at random times, including while CLK is high. Checks: GCLK
// is never high while CLK is low; GCLK is a full copy of each CLK high
// phase whose enable was sampled while CLK was low (no shortened pulses);
// the number of GCLK pulses equals the number of enabled CLK cycles.
module tb_bhm_clock_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  bhm_clock_gate dut (.*);

  int checks = 0, failures = 0, n_pulse = 0, n_exp = 0, n_glitch = 0, n_hi_change = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en_at_rise;
  always @(posedge clk) begin
    en_at_rise = en;
    if (en) n_exp++;
  end
  always @(posedge gclk) n_pulse++;
  always @(gclk) if (gclk && !clk) n_glitch++;
  always @(negedge gclk) if (clk) n_glitch++;          // ended early

  initial begin
    #100000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      #($urandom_range(1, 9));
      if ($time % 5 == 0) #1;     // never exactly on a clock edge
      if (clk) n_hi_change++;
      en = 1'($urandom);
    end
    @(negedge clk); en = 0;
    @(negedge clk);
    check(n_glitch == 0, $sformatf("%0d glitches", n_glitch));
    check(n_pulse == n_exp, $sformatf("pulses %0d, enabled cycles %0d", n_pulse, n_exp));
    check(n_hi_change > 0 && n_pulse > 0, "enable changed while the clock was high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
