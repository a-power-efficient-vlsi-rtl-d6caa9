// tb_bhm_scu: test of the system control unit.
//
// Sends several activation commands. Checks, for each: the internal reset
// is a single cycle right after the command and the new mode is stored at
// the same edge; RUNNING stays low until INIT_DONE (given by a compressor
// model 96 cycles after the internal reset) and rises on the next edge
// together with the one-cycle FICU trigger (98 cycles after the internal
// reset with this model); each gated clock runs exactly
// when its enable rule holds (ICA: bits 0 and 1, HRV: bits 2 and 3, DOT:
// bit 4)
// and is stopped from the command until INIT_DONE. Before the first
// command the chip is inactive and no gated clock runs.
module tb_bhm_scu;
  import bhm_pkg::*;
  logic clk = 0, reset = 1, rx_mode_valid = 0, comp_init_done = 0;
  logic [7:0] rx_mode = '0, current_mode;
  logic system_reset, running, ficu_trigger, gclk_ica, gclk_hrv, gclk_dot;
  always #5 clk = ~clk;
  bhm_scu dut (.*);

  int checks = 0, failures = 0;
  int n_ica = 0, n_hrv = 0, n_dot = 0;
  always @(posedge gclk_ica) n_ica++;
  always @(posedge gclk_hrv) n_hrv++;
  always @(posedge gclk_dot) n_dot++;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int init_cnt = -1;
  always @(posedge clk) begin
    if (system_reset) init_cnt <= 0;
    else if (init_cnt >= 0 && init_cnt < 96) init_cnt <= init_cnt + 1;
    comp_init_done <= (init_cnt == 95);
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] modes [6] = '{8'h1F, 8'h01, 8'h03, 8'h0C, 8'h14, 8'hE8};
    int wait_cyc, a, h, d;
    repeat (3) @(posedge clk); reset = 0;
    repeat (50) @(posedge clk);
    check(!running && n_ica == 0 && n_hrv == 0 && n_dot == 0, "inactive before the first command");
    foreach (modes[m]) begin
      @(negedge clk); rx_mode_valid = 1; rx_mode = modes[m];
      @(negedge clk); rx_mode_valid = 0;
      check(system_reset && current_mode == modes[m] && !running, "internal reset and mode after the command");
      @(negedge clk);
      check(!system_reset, "internal reset lasts one cycle");
      a = n_ica; h = n_hrv; d = n_dot; wait_cyc = 1;
      while (!running) begin
        check(!ficu_trigger, "no trigger before INIT_DONE");
        @(negedge clk); wait_cyc++;
      end
      check(n_ica == a && n_hrv == h && n_dot == d, "clocks stopped during initialisation");
      check(ficu_trigger, "FICU trigger with RUNNING");
      // 96 initialisation cycles of the compressor model, its registered
      // INIT_DONE, and the SCU's registered RUNNING
      check(wait_cyc == 98, $sformatf("RUNNING %0d cycles after the internal reset", wait_cyc));
      a = n_ica; h = n_hrv; d = n_dot;
      repeat (20) @(negedge clk);
      check(!ficu_trigger, "trigger is one cycle");
      check((n_ica - a == 20) == (modes[m][0] & modes[m][1]), $sformatf("ICA clock, mode %h", modes[m]));
      check((n_hrv - h == 20) == (modes[m][2] & modes[m][3]), $sformatf("HRV clock, mode %h", modes[m]));
      check((n_dot - d == 20) == modes[m][4], $sformatf("DOT clock, mode %h", modes[m]));
      check((n_ica - a) % 20 == 0 && (n_hrv - h) % 20 == 0 && (n_dot - d) % 20 == 0, "clock either on or off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
