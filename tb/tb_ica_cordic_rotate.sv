// tb_ica_cordic_rotate: random test of the rotation (vector) CORDIC.
//
// Random vectors of random magnitude (2^12 .. 2^34, the range the
// whitening unit uses) rotated by random angles in
// (-pi/2, pi/2). The result must match (x cos t - y sin t, x sin t +
// y cos t) within 2e-4 of the vector length plus 16 LSB, and done must come
// exactly ITER+2 = 18 cycles after start.
module tb_ica_cordic_rotate;
  import ica_cordic_pkg::*;
  logic clk = 0, reset = 1, start = 0, done;
  cdata_t x_in, y_in, x_out, y_out;
  angle_t theta;
  always #5 clk = ~clk;
  ica_cordic_rotate dut (.*);

  int checks = 0, failures = 0;
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
    real xr, yr, tr, ex, ey, len, tol;
    int lat, sc;
    repeat (3) @(posedge clk); reset = 0;
    for (int t = 0; t < 500; t++) begin
      sc = $urandom_range(12, 34);
      xr = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 * (2.0 ** sc);
      yr = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 * (2.0 ** sc);
      tr = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 * 1.55;
      @(negedge clk); start = 1; x_in = cdata_t'($rtoi(xr)); y_in = cdata_t'($rtoi(yr));
      theta = angle_t'($rtoi(tr * (2.0 ** 28)));
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      tr = real'(theta) / (2.0 ** 28);
      ex = real'(x_in) * $cos(tr) - real'(y_in) * $sin(tr);
      ey = real'(x_in) * $sin(tr) + real'(y_in) * $cos(tr);
      len = $sqrt(real'(x_in) ** 2 + real'(y_in) ** 2);
      tol = len * 2e-4 + 16;   // truncation of 16 shifted adds
      check(fabs(real'(x_out) - ex) < tol && fabs(real'(y_out) - ey) < tol,
            $sformatf("(%0d,%0d) by %f -> (%0d,%0d) expected (%f,%f)", x_in, y_in, tr, x_out, y_out, ex, ey));
      check(lat == 18, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
