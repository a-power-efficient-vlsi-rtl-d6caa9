// tb_ica_inv_sqrt: test of the 1/sqrt unit of the whitening unit.
//
// Random eigenvalues (Q.6) over the whole range plus the clamp cases
// (zero, negative, above 2^27 LSB). d must equal 2^24 / sqrt(lambda) with
// lambda in real units (lambda_q6 / 64), within the truncation error of the integer
// square root (1/s relative) plus 2 LSB,
// and the done pulse must come exactly 24 + 38 + 1 = 63 cycles after start.
module tb_ica_inv_sqrt;
  logic clk = 0, reset = 1, start = 0, done;
  logic signed [39:0] lambda_q6;
  logic [31:0] d_q24;
  always #5 clk = ~clk;
  ica_inv_sqrt dut (.*);

  int checks = 0, failures = 0, n_clamp = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(real v); return (v < 0) ? -v : v; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint l, lc;
    real ex;
    int lat;
    repeat (3) @(posedge clk); reset = 0;
    for (int t = 0; t < 400; t++) begin
      l = longint'($urandom_range(1, 1 << $urandom_range(1, 27)));
      if (t == 0) l = 0;
      if (t == 1) l = -5000;
      if (t == 2) l = 64'd1 << 30;
      if (t == 3) l = 1;
      if (t == 4) l = 64;
      lc = (l < 1) ? 1 : (l > 134217727) ? 134217727 : l;
      if (lc != l) n_clamp++;
      @(negedge clk); start = 1; lambda_q6 = 40'(l);
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      ex = (2.0 ** 24) / $sqrt(real'(lc) / 64.0);
      // s = isqrt(lambda_q6 * 2^20) is truncated to an integer: relative
      // error up to 1/s, plus the division's last bit
      check(fabs(real'(d_q24) - ex) <= ex / $sqrt(real'(lc) * (2.0 ** 20)) + 2,
            $sformatf("lambda %0d: d %0d expected %f", l, d_q24, ex));
      check(lat == 63, $sformatf("latency %0d", lat));
    end
    check(n_clamp == 3, "clamp cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
