// tb_ica_ctr: random test of the centering unit (four subtractors).
//
// For random 10-bit samples and Q10.6 means, XZM must equal x*64 - mean
// (Q10.6, signed) for every channel, and XZM_VALID must be IN_VALID and
// MEAN_VALID. Combinational: checked 1 time unit after the inputs change.
module tb_ica_ctr;
  import ica_pkg::*;
  logic in_valid, mean_valid, xzm_valid;
  sample4_t x;
  mean4_t mean;
  xzm4_t xzm;
  ica_ctr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fork begin #100000; $display("FAIL: watchdog"); failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int t = 0; t < 2000; t++) begin
      in_valid = 1'($urandom); mean_valid = 1'($urandom);
      for (int c = 0; c < 4; c++) begin
        x[c] = sample_t'($urandom_range(0, 1023));
        mean[c] = (t < 4) ? ((t[0]) ? 16'hFFC0 : 16'h0) : mean_t'($urandom_range(0, 65535));
        if (t == 2) x[c] = 0;
        if (t == 3) x[c] = 1023;
      end
      #1;
      for (int c = 0; c < 4; c++)
        check(int'(xzm[c]) == int'(x[c]) * 64 - int'(mean[c]),
              $sformatf("ch %0d: x %0d mean %0d -> %0d", c, x[c], mean[c], xzm[c]));
      check(xzm_valid == (in_valid && mean_valid), "valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
