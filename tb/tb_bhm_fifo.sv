// tb_bhm_fifo: random test of the raw-sample FIFO against a queue model.
//
// Random writes and random OUT_READY (default 10-bit x 8). Checks that the
// read data follow the written order, that OUT_VALID equals "model not
// empty", that a write to a full FIFO is dropped and sets the sticky
// OVERFLOW flag, and that the FIFO became full and empty at least once.
module tb_bhm_fifo;
  logic clk = 0, reset = 1, in_valid = 0, out_ready = 0, out_valid, overflow;
  logic [9:0] in_data = '0, out_data;
  always #5 clk = ~clk;
  bhm_fifo dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_drop = 0;
  int q [$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wr_bias;
    bit pop, full;
    repeat (3) @(posedge clk); reset = 0;
    for (int t = 0; t < 5000; t++) begin
      wr_bias = (t / 500) % 2 ? 1 : 3;      // alternate filling and draining
      @(negedge clk);
      check(out_valid == (q.size() != 0), "out_valid");
      if (out_valid && q.size() != 0) check(out_data == 10'(q[0]), "data order");
      in_valid = ($urandom_range(0, 3) < wr_bias); in_data = 10'($urandom);
      out_ready = ($urandom_range(0, 3) >= wr_bias);
      #1;
      pop = out_valid && out_ready;
      full = (q.size() == 8);       // a full FIFO refuses a write even when read
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (in_valid) begin
        if (!full) q.push_back(in_data);
        else n_drop++;
      end
      if (q.size() == 8) n_full++;
      if (q.size() == 0) n_empty++;
    end
    @(negedge clk);
    check(n_full > 0 && n_empty > 0, "full and empty reached");
    check(n_drop > 0 && overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
