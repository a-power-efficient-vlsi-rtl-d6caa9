// tb_ica_nl_lookup: exhaustive test of the mirrored non-linear lookup unit.
//
// Every 16-bit input u (Q7.8) is applied. Checks: the output equals the
// table entry selected by the mirrored index (inverted for u < 0);
// |f(u) - (1 - 2/(1+exp(-u)))| is within the table's step error (0.13);
// f never increases with u (except the 1-LSB step of the one's-complement
// mirror at u = 0); saturation to -1 / about +1 beyond |u| >= 8;
// mirror symmetry f(-1-u) = ~f(u). Counts the saturated inputs.
module tb_ica_nl_lookup;
  import ica_pkg::*;
  word_t u, f;
  ica_nl_lookup dut (.u, .f_u(f));

  int checks = 0, failures = 0, n_sat = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int rom(int k);
    if (k == 31) return -16384;
    return int'($floor((1.0 - 2.0 / (1.0 + $exp(-real'(k) / 4.0))) * 16384.0 + 0.5));
  endfunction

  initial begin
    int prev, e, k, m, fm;
    real ur, ideal;
    fork begin #1000000; $display("FAIL: watchdog"); failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    prev = 40000;
    for (int i = -32768; i < 32768; i++) begin
      u = word_t'(i); #1;
      if (i >= 0) begin k = (i >= 2048) ? 31 : (i >> 6); e = rom(k); end
      else begin m = -i - 1; k = (m >= 2048) ? 31 : (m >> 6); e = -rom(k) - 1; end
      if (k == 31) n_sat++;
      check(int'(f) == e, $sformatf("u=%0d f=%0d expected %0d", i, f, e));
      ur = real'(i) / 256.0;
      ideal = 1.0 - 2.0 / (1.0 + $exp(-ur));
      check((real'(f) / 16384.0 - ideal) < 0.13 && (ideal - real'(f) / 16384.0) < 0.13,
            $sformatf("u=%f f=%f ideal %f", ur, real'(f) / 16384.0, ideal));
      // the one's-complement mirror steps up by one LSB between u = -1 and 0
      check(int'(f) <= prev + ((i == 0) ? 1 : 0), $sformatf("monotone at u=%0d", i));
      prev = int'(f);
      if (i >= 2048) check(int'(f) == -16384, "saturation high");
      if (i < -2048) check(int'(f) == 16383, "saturation low");
      if (i >= 0) begin
        fm = int'(f);
        u = word_t'(-1 - i); #1;
        check(int'(f) == -fm - 1, "mirror symmetry");
      end
    end
    check(n_sat > 0, "saturation region used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
