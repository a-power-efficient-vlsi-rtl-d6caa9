// tb_ica_ibu: test of the input buffering unit (3 circular banks).
//
// Feeds 7 half-windows of numbered samples (channel words serial, 1..4).
// Checks: WIN_START after the 2nd, 3rd, ... half-window; OUT_START from the
// 3rd on, in the same cycle; at every WIN_START port A returns the 64
// samples of the last two half-windows in order, and at every OUT_START
// port B returns the previous half-window (the three-bank rotation);
// ENGINE_BUSY at a window boundary skips that window and sets the sticky
// OVERRUN flag; ENABLE = 0 ignores input.
module tb_ica_ibu;
  import ica_pkg::*;
  logic clk = 0, reset = 1, enable = 1, in_valid = 0, engine_busy = 0;
  sample_t eeg_in = '0;
  logic win_start, out_start, overrun;
  logic [5:0] rd_a_addr = '0;
  logic [4:0] rd_b_addr = '0;
  sample4_t rd_a_data, rd_b_data;
  always #500 clk = ~clk;   // slow clock: the port reads below take 1 time unit each
  ica_ibu dut (.*);

  int checks = 0, failures = 0, n_win = 0, n_out = 0, n_skip = 0;
  int half_in = 0;   // completed half-windows
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic sample_t val(int n, int c);   // sample n, channel c
    return sample_t'((n * 7 + c * 131) % 1024);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // window checks, done within the clock cycle of the start pulses
  always @(posedge clk) begin
    #1;
    if (win_start) begin
      int h;
      h = half_in + 1; // half-windows filled so far, counting this one
      n_win++;
      for (int j = 0; j < 64; j++) begin
        rd_a_addr = 6'(j); #1;
        for (int c = 0; c < 4; c++)
          check(rd_a_data[c] == val((h - 2) * 32 + j, c), $sformatf("window of half %0d sample %0d ch %0d", h, j, c));
      end
      check(out_start == (h >= 3), "out_start with the 3rd and later windows");
      if (out_start) begin
        n_out++;
        for (int k = 0; k < 32; k++) begin
          rd_b_addr = 5'(k); #1;
          for (int c = 0; c < 4; c++)
            check(rd_b_data[c] == val((h - 2) * 32 + k, c), $sformatf("output half sample %0d ch %0d", k, c));
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); reset = 0;
    for (int n = 0; n < 7 * 32; n++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk); in_valid = 1; eeg_in = val(n, c);
        // the 5th half-window ends while the engine is busy
        engine_busy = (n == 5 * 32 - 1 && c == 3);
        @(negedge clk); in_valid = 0; engine_busy = 0;
      end
      if (n % 32 == 31) half_in++;
      if (n == 5 * 32 - 1) begin
        @(posedge clk); #2;
        check(overrun, "window skipped while busy");
        n_skip++;
      end
    end
    repeat (5) @(posedge clk);
    check(n_win == 5, $sformatf("windows started %0d", n_win));
    check(n_out == 4, $sformatf("outputs started %0d", n_out));
    // disabled: input ignored
    @(negedge clk); enable = 0;
    for (int i = 0; i < 200; i++) begin @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0; end
    check(n_win == 5, "no window while disabled");
    check(n_skip == 1 && overrun, "overrun mechanism");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
