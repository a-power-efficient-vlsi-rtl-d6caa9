// tb_ica_wu: whitening unit test.
// Builds covariance matrices from random correlated data (in floating point),
// feeds them in Q.6, and checks that the returned P whitens them:
// P C P^T = I within 2% per element, and that P is symmetric. Then checks
// served samples z = P (x - mean) against a floating-point reference and the
// z latency (5 cycles). Also checks the time to P against the schedule:
// NSWEEP sweeps x 3 steps x (angle + 3 rotation passes) + 1/sqrt + products.
module tb_ica_wu;
  import ica_pkg::*;
  logic clk = 0, reset = 1, start = 0;
  always #5 clk = ~clk;
  accmat4_t cov, p_mat;
  mean4_t mean;
  logic mean_valid = 1, p_done, z_req = 0, z_valid;
  logic [5:0] z_idx = 0, rd_addr;
  sample4_t rd_data;
  vec4_t z;
  sample4_t mem [64];
  assign rd_data = mem[rd_addr];

  ica_wu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c [4][4], p [4][4], r, m [4], zr;
    real mix [4][4];
    int cycles;
    repeat (3) @(posedge clk); reset = 0;
    for (int trial = 0; trial < 4; trial++) begin
      // random mixing -> covariance = A diag(s) A^T
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          mix[i][j] = (i == j ? 1.0 : 0.0) + real'($urandom_range(0, 1000)) / 1500.0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          c[i][j] = 0;
          for (int k = 0; k < 4; k++) c[i][j] += mix[i][k] * mix[j][k] * (20.0 + 30.0 * trial) * (k + 1);
        end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) cov[i][j] = acc_t'(longint'(c[i][j] * 64.0));
      for (int i = 0; i < 4; i++) mean[i] = mean_t'(500 * 64 + 32 * i);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!p_done) begin @(posedge clk); cycles++; end
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) p[i][j] = real'(p_mat[i][j]) / 16777216.0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          r = 0;
          for (int k = 0; k < 4; k++)
            for (int l = 0; l < 4; l++) r += p[i][k] * c[k][l] * p[j][l];
          check((r - (i == j ? 1.0 : 0.0)) < 0.02 && (r - (i == j ? 1.0 : 0.0)) > -0.02,
                $sformatf("trial %0d PCP^T[%0d][%0d] = %f", trial, i, j, r));
          check(p[i][j] - p[j][i] < 1e-3 && p[j][i] - p[i][j] < 1e-3, "P symmetric");
        end
      check(cycles > 1000 && cycles < 3000, $sformatf("P after %0d cycles", cycles));
      // z service
      for (int n = 0; n < 64; n++)
        for (int ch = 0; ch < 4; ch++) mem[n][ch] = sample_t'($urandom_range(400, 620));
      for (int n = 0; n < 8; n++) begin
        @(negedge clk); z_req = 1; z_idx = 6'(n * 7); @(negedge clk); z_req = 0;
        cycles = 1;
        while (!z_valid) begin @(posedge clk); cycles++; end
        @(negedge clk);
        check(cycles == 6, $sformatf("z latency %0d", cycles));  // counted from the request cycle
        for (int i = 0; i < 4; i++) begin
          zr = 0;
          for (int k = 0; k < 4; k++)
            zr += p[i][k] * (real'(mem[n*7][k]) - real'(mean[k]) / 64.0);
          check(real'(z[i]) / 256.0 - zr < 0.02 && zr - real'(z[i]) / 256.0 < 0.02,
                $sformatf("z[%0d] %f vs %f", i, real'(z[i]) / 256.0, zr));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
