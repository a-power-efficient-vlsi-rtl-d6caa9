// tb_ica_processor: end-to-end test of the 4-channel ICA processor.
//
// Four super-Gaussian (Laplacian) sources are mixed by a fixed 4x4 matrix,
// offset to mid-scale and fed as 10-bit samples, channel 1..4 per instant,
// one word every 1595 cycles: the document's low-power operating point of a
// 0.817 MHz clock with 128 Hz EEG (0.817e6 / 512 words per second). At this
// rate worst-case training (512 iterations) must end before the next
// half-window is full, which the overrun check confirms. Checks:
//   * every output block has 128 words (32 samples x 4 components);
//   * separation, computed here in floating point from the sources: the
//     mean best |corr| over all blocks after the first two is >= 0.9 (the
//     document reports 0.86 on its own super-Gaussian set); from block 4
//     on, when W has trained on several windows, every component has
//     |corr| >= 0.7 with one source and each block's mean is >= 0.8;
//   * the first window's training ends within the document's worst-case
//     budget of 203757 cycles;
//   * the output handshake is exercised with random OUT_READY stalls;
//   * bypass mode returns the input words unchanged.
module tb_ica_processor;
  import ica_pkg::*;

  localparam int NHALF   = 12;         // half-windows fed in normal mode
  localparam int GAP     = 1595;      // cycles between input words
  localparam int WATCHDOG = 3_000_000;

  logic clk = 0, reset = 1, bypass = 0, in_valid = 0, out_ready = 0;
  sample_t eeg_in = '0;
  logic out_valid;
  word_t out_data;
  logic overrun, training, train_done, converged;
  logic [9:0] iterations;
  always #5 clk = ~clk;

  ica_processor dut (.*);

  int checks = 0, failures = 0;
  real src [NHALF*32][4];
  real a_mix [4][4] = '{'{1.0,0.6,0.3,0.2},'{0.5,1.0,0.4,0.3},'{0.3,0.5,1.0,0.6},'{0.2,0.3,0.5,1.0}};
  int  outs [$];
  int  stalls = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real laplace();
    real u;
    u = (real'($urandom_range(1, 1_000_000))) / 1_000_001.0;
    return ($urandom_range(0,1) ? 1.0 : -1.0) * (-$ln(u));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // output collector with random stalls
  always @(posedge clk) begin
    if (!reset) begin
      if (out_valid && out_ready) outs.push_back(int'(out_data));
      if (out_valid && !out_ready) stalls++;
      out_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  // training-time monitor
  longint t_start = -1, t_first = -1, t_win = -1;
  always @(posedge clk) if (!reset) begin
    if (dut.u_ibu.win_start && t_win < 0) t_win = cyc;
    if (dut.u_tu.start && t_start < 0) t_start = cyc;
    if (dut.u_tu.done)
      $display("window trained: %0d iterations, converged=%0d", dut.u_tu.iterations, dut.u_tu.converged);
    if (dut.u_tu.done && t_first < 0) begin
      t_first = cyc - t_start;
      $display("first window: %0d iterations, %0d cycles, converged=%0d",
               dut.u_tu.iterations, t_first, dut.u_tu.converged);
      $display("window start to end of training: %0d cycles", cyc - t_win);
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    int  code;
    real mc, mo, sc, so, scov, best, sum_best;
    real comp [32][4];
    int  nblk;
    real all_best = 0;
    for (int n = 0; n < NHALF*32; n++)
      for (int c = 0; c < 4; c++) src[n][c] = laplace();
    repeat (5) @(posedge clk);
    reset = 0;
    for (int n = 0; n < NHALF*32; n++) begin
      for (int c = 0; c < 4; c++) begin
        x = 512.0;
        for (int k = 0; k < 4; k++) x += 28.0 * a_mix[c][k] * src[n][k];
        code = int'(x);
        if (code < 0) code = 0;
        if (code > 1023) code = 1023;
        @(negedge clk); in_valid = 1; eeg_in = sample_t'(code);
        @(negedge clk); in_valid = 0;
        repeat (GAP) @(posedge clk);
      end
    end
    repeat (5000) @(posedge clk);
    // Blocks: outputs of half-window h (h = 1 .. NHALF-2) in order.
    nblk = outs.size() / 128;
    check(outs.size() == (NHALF - 2) * 128, $sformatf("output words %0d", outs.size()));
    check(t_first > 0 && t_first <= 203757, $sformatf("first training %0d cycles", t_first));
    for (int b = 2; b < nblk; b++) begin
      int h;
      h = b + 1;
      for (int s = 0; s < 32; s++)
        for (int c = 0; c < 4; c++) comp[s][c] = real'(outs[b*128 + s*4 + c]) / 256.0;
      sum_best = 0;
      for (int c = 0; c < 4; c++) begin
        best = 0;
        for (int k = 0; k < 4; k++) begin
          mc = 0; mo = 0;
          for (int s = 0; s < 32; s++) begin mc += src[h*32+s][k]; mo += comp[s][c]; end
          mc /= 32; mo /= 32; sc = 0; so = 0; scov = 0;
          for (int s = 0; s < 32; s++) begin
            sc += (src[h*32+s][k]-mc)**2; so += (comp[s][c]-mo)**2;
            scov += (src[h*32+s][k]-mc)*(comp[s][c]-mo);
          end
          if (so > 0 && sc > 0 && (scov / $sqrt(sc*so)) ** 2 > best ** 2) best = $sqrt((scov**2)/(sc*so));
        end
        sum_best += best;
        if (b >= 4) check(best >= 0.7, $sformatf("block %0d comp %0d corr %f", b, c, best));
      end
      $display("block %0d mean best |corr| = %f", b, sum_best/4);
      if (b >= 4) check(sum_best / 4 >= 0.8, $sformatf("block %0d mean corr %f", b, sum_best/4));
      all_best += sum_best / 4;
    end
    $display("mean |corr| over blocks 2..%0d = %f", nblk - 1, all_best / (nblk - 2));
    check(all_best / (nblk - 2) >= 0.9, "average correlation");
    check(stalls > 0, "output stalls exercised");
    check(overrun == 0, "no overrun");
    // bypass mode
    outs.delete();
    @(negedge clk); bypass = 1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); in_valid = 1; eeg_in = sample_t'(i * 37 + 5);
      @(negedge clk); in_valid = 0;
      repeat (6) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(outs.size() == 20, $sformatf("bypass words %0d", outs.size()));
    for (int i = 0; i < outs.size() && i < 20; i++)
      check(outs[i] == i * 37 + 5, $sformatf("bypass word %0d = %0d", i, outs[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
