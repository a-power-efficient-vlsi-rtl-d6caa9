// tb_ica_tu: test of the Infomax training unit.
//
// A window of 64 whitened samples z = R s (s: unit-variance Laplacian
// sources, R: random rotation, Q7.8) is served on request with the
// whitening unit's latency (z_valid 6 cycles after z_req). Two units run
// side by side on the same data:
//   * dut  (defaults: 512 iterations, threshold 0) trains the window three
//     times in a row (W carries over). Checks: iteration limit reached
//     (512, converged = 0); each training takes 512 x 393 cycles plus the
//     16-word W stream (prefetch keeps the z service off the critical
//     path), within the document's worst-case window budget of 203757
//     cycles; the W stream is 16 words in row-major order; after training
//     u = W z separates the sources (mean best |corr| >= 0.85).
//   * dut_thr (THRESH_LSB = 10000, sum of dW^2 in units of 2^-24) must stop early with converged = 1, which
//     exercises the convergence test.
module tb_ica_tu;
  import ica_pkg::*;
  logic clk = 0, reset = 1, start = 0;
  always #5 clk = ~clk;

  // z service shared by both units (each has its own request pipeline)
  vec4_t zmem [64];
  logic       z_req [2], z_valid [2], busy [2], done [2], converged [2], w_out_valid [2];
  logic [5:0] z_idx [2];
  vec4_t      z [2];
  logic [9:0] iterations [2];
  logic [3:0] w_out_idx [2];
  word_t      w_out_data [2];

  ica_tu dut (.clk, .reset, .start, .z_req(z_req[0]), .z_idx(z_idx[0]), .z_valid(z_valid[0]), .z(z[0]),
    .busy(busy[0]), .done(done[0]), .converged(converged[0]), .iterations(iterations[0]),
    .w_out_valid(w_out_valid[0]), .w_out_idx(w_out_idx[0]), .w_out_data(w_out_data[0]));
  ica_tu #(.THRESH_LSB(10000)) dut_thr (.clk, .reset, .start, .z_req(z_req[1]), .z_idx(z_idx[1]),
    .z_valid(z_valid[1]), .z(z[1]), .busy(busy[1]), .done(done[1]), .converged(converged[1]),
    .iterations(iterations[1]), .w_out_valid(w_out_valid[1]), .w_out_idx(w_out_idx[1]),
    .w_out_data(w_out_data[1]));

  for (genvar g = 0; g < 2; g++) begin : g_zsrv
    logic [5:0] pipe_idx [6];
    logic       pipe_v [6];
    always @(posedge clk) begin
      pipe_v[0] <= z_req[g]; pipe_idx[0] <= z_idx[g];
      for (int i = 1; i < 6; i++) begin pipe_v[i] <= pipe_v[i-1]; pipe_idx[i] <= pipe_idx[i-1]; end
    end
    // z_valid in the 6th cycle after the request cycle
    assign z_valid[g] = pipe_v[4];
    assign z[g] = zmem[pipe_idx[4]];
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t wlast [16];
  int nw = 0, order_bad = 0;
  always @(posedge clk) if (w_out_valid[0]) begin
    if (w_out_idx[0] != 4'(nw % 16)) order_bad++;
    wlast[w_out_idx[0]] = w_out_data[0];
    nw++;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real laplace();
    real u;
    u = (real'($urandom_range(1, 1_000_000))) / 1_000_001.0;
    return ($urandom_range(0,1) ? 1.0 : -1.0) * (-$ln(u)) / $sqrt(2.0);
  endfunction

  initial begin
    real s [64][4], r [4][4], g [4][4], th, c, sn, tmp, uu [64][4];
    real mc, mo, sc, so, scov, best, sum;
    longint t0, tt;
    bit thr_done;
    // random rotation: product of Givens rotations
    foreach (r[i, k]) r[i][k] = (i == k) ? 1.0 : 0.0;
    for (int a = 0; a < 4; a++) for (int b = a + 1; b < 4; b++) begin
      th = real'($urandom_range(0, 6283)) / 1000.0; c = $cos(th); sn = $sin(th);
      for (int k = 0; k < 4; k++) begin
        tmp = c * r[a][k] - sn * r[b][k]; r[b][k] = sn * r[a][k] + c * r[b][k]; r[a][k] = tmp;
      end
    end
    for (int n = 0; n < 64; n++) begin
      for (int k = 0; k < 4; k++) s[n][k] = laplace();
      for (int i = 0; i < 4; i++) begin
        tmp = 0;
        for (int k = 0; k < 4; k++) tmp += r[i][k] * s[n][k];
        zmem[n][i] = word_t'($rtoi(tmp * 256.0));
      end
    end
    repeat (3) @(posedge clk); reset = 0;
    thr_done = 0;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done[0]) begin
        @(negedge clk);
        if (done[1] && !thr_done) begin
          thr_done = 1;
          $display("threshold unit: %0d iterations, converged=%0d", iterations[1], converged[1]);
          check(converged[1] && iterations[1] < 512, "early convergence with a threshold");
        end
      end
      tt = cyc - t0;
      $display("training %0d: %0d iterations, converged=%0d, %0d cycles", rep, iterations[0], converged[0], tt);
      check(iterations[0] == 10'd512 && !converged[0], "iteration limit");
      check(tt >= 512 * 393 && tt <= 512 * 393 + 24, $sformatf("training cycles %0d", tt));
      check(tt <= 203757, "within the worst-case window budget");
    end
    repeat (3) @(posedge clk);
    check(thr_done, "threshold unit finished");
    check(nw == 48 && order_bad == 0, $sformatf("W stream words %0d, order errors %0d", nw, order_bad));
    // separation
    for (int n = 0; n < 64; n++) for (int i = 0; i < 4; i++) begin
      uu[n][i] = 0;
      for (int k = 0; k < 4; k++) uu[n][i] += real'(wlast[i*4+k]) / 4096.0 * real'(zmem[n][k]);
    end
    sum = 0;
    for (int i = 0; i < 4; i++) begin
      best = 0;
      for (int k = 0; k < 4; k++) begin
        mc = 0; mo = 0;
        for (int n = 0; n < 64; n++) begin mc += s[n][k]; mo += uu[n][i]; end
        mc /= 64; mo /= 64; sc = 0; so = 0; scov = 0;
        for (int n = 0; n < 64; n++) begin
          sc += (s[n][k]-mc)**2; so += (uu[n][i]-mo)**2; scov += (s[n][k]-mc)*(uu[n][i]-mo);
        end
        if ((scov**2)/(sc*so) > best**2) best = $sqrt((scov**2)/(sc*so));
      end
      sum += best;
    end
    $display("mean best |corr| after training: %f", sum / 4);
    check(sum / 4 >= 0.85, "sources separated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
