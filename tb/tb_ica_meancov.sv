// tb_ica_meancov: random test of the mean and covariance unit.
//
// A 64-sample window memory (random 10-bit samples of random spread) is
// read through the unit's asynchronous read port. Checks, per window:
// mean_c = sum_c (Q10.6, exact), cov_pq = (64*Q_pq - S_p*S_q) >> 6 (Q.6,
// exact, arithmetic shift) for all 16 elements and symmetry, and the done
// pulse exactly 64*14 + 11 cycles after start. Includes constant windows
// (zero covariance) and full-scale windows.
module tb_ica_meancov;
  import ica_pkg::*;
  logic clk = 0, reset = 1, start = 0, done, mean_valid;
  logic [5:0] rd_addr;
  sample4_t rd_data, mem [64];
  mean4_t mean;
  accmat4_t cov;
  always #5 clk = ~clk;
  assign rd_data = mem[rd_addr];
  ica_meancov dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint s [4], q [4][4], e;
    int lat, spread, base;
    repeat (3) @(posedge clk); reset = 0;
    for (int w = 0; w < 20; w++) begin
      for (int c = 0; c < 4; c++) begin
        spread = (w == 0) ? 0 : (w == 1) ? 1023 : $urandom_range(1, 511);
        base = (w == 1) ? 0 : $urandom_range(0, 1023 - spread);
        for (int j = 0; j < 64; j++)
          mem[j][c] = sample_t'((w == 1) ? ((j + c) % 2) * 1023 : base + $urandom_range(0, spread));
      end
      foreach (s[i]) s[i] = 0;
      foreach (q[i, k]) q[i][k] = 0;
      for (int j = 0; j < 64; j++)
        for (int a = 0; a < 4; a++) begin
          s[a] += mem[j][a];
          for (int b = 0; b < 4; b++) q[a][b] += longint'(mem[j][a]) * mem[j][b];
        end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 64 * 14 + 11, $sformatf("latency %0d", lat));
      check(mean_valid, "mean_valid");
      for (int a = 0; a < 4; a++) begin
        check(longint'(mean[a]) == s[a], $sformatf("mean %0d: %0d vs %0d", a, mean[a], s[a]));
        for (int b = 0; b < 4; b++) begin
          e = (64 * q[a][b] - s[a] * s[b]) >>> 6;
          check(longint'(cov[a][b]) == e, $sformatf("window %0d cov[%0d][%0d] = %0d expected %0d", w, a, b, cov[a][b], e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
