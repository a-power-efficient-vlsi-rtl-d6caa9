// tb_ica_cordic_angle: random test of the vectoring (angle) CORDIC.
//
// Random (x, y) pairs of random magnitude in all four quadrants, plus the
// axes. theta must equal atan(y/x) within 2e-4 rad (16 iterations) plus
// 4 LSB over the vector length, and the
// done pulse must come exactly ITER+1 = 17 cycles after start.
module tb_ica_cordic_angle;
  import ica_cordic_pkg::*;
  logic clk = 0, reset = 1, start = 0, done;
  cdata_t x_in, y_in;
  angle_t theta;
  always #5 clk = ~clk;
  ica_cordic_angle dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real xr, yr, th, ex, pi, tol;
    int lat, sc;
    pi = 3.14159265358979;
    repeat (3) @(posedge clk); reset = 0;
    for (int t = 0; t < 500; t++) begin
      sc = $urandom_range(12, 30);
      xr = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 * (2.0 ** sc);
      yr = (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0 * (2.0 ** sc);
      if (t == 0) begin xr = 1000.0; yr = 0; end
      if (t == 1) begin xr = 0; yr = 1000.0; end
      if (t == 2) begin xr = -1000.0; yr = 5.0; end
      if (xr == 0 && yr == 0) xr = 1;
      @(negedge clk); start = 1; x_in = cdata_t'($rtoi(xr)); y_in = cdata_t'($rtoi(yr));
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      th = real'(theta) / (2.0 ** 28);
      if (x_in == 0) ex = (y_in >= 0) ? pi / 2 : -pi / 2;
      else ex = $atan(real'(y_in) / real'(x_in));
      // residual error: 2^-16 rad from the iteration count plus about
      // 4 LSB of the final y over the vector length
      tol = 2e-4 + 4.0 / $sqrt(real'(x_in) ** 2 + real'(y_in) ** 2);
      check((th - ex) < tol && (ex - th) < tol,
            $sformatf("x %0d y %0d theta %f expected %f", x_in, y_in, th, ex));
      check(lat == 17, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
