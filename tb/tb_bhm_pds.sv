// tb_bhm_pds: random test of the prioritized data selector.
//
// Four sources offer numbered words with valid/ready (each holds its word
// until taken); the compressor side has random READY. Checks: each
// source's words arrive complete and in order with the right source tag;
// whenever more than one source is valid the granted one is the
// highest-priority one (EKG, EEG/ICA, HRV, DOT); the output word is held
// while READY is low; the bypass flag follows mode bits 5-7 (HRV always
// bypassed). Runs with two different mode words.
module tb_bhm_pds;
  import bhm_pkg::*;
  logic clk = 0, reset = 1, out_ready = 0, out_valid, out_bypass;
  logic [7:0] mode = '0;
  logic [3:0] src_valid = '0, src_ready;
  logic [15:0] src_data [4];
  logic [15:0] out_data;
  src_e out_src;
  always #5 clk = ~clk;
  bhm_pds dut (.*);

  int checks = 0, failures = 0, n_arb = 0, n_stall = 0;
  int sent [4], rcvd [4];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sources
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (src_valid[i] && src_ready[i]) begin src_valid[i] <= 0; sent[i]++; end
      else if (!src_valid[i] && $urandom_range(0, 4) == 0 && !reset) begin
        src_valid[i] <= 1; src_data[i] <= 16'(i * 10000 + sent[i]);
      end
    end
  end

  // arbitration check (before the clock edge)
  always @(negedge clk) begin
    if ($countones(src_valid) > 1 && src_ready != 0) begin
      n_arb++;
      for (int i = 0; i < 4; i++) if (src_valid[i]) begin
        check(src_ready[i], $sformatf("source %0d should be granted", i));
        break;
      end
    end
    check($countones(src_ready) <= 1, "one grant at a time");
  end

  // sink
  logic [15:0] held;
  logic held_v = 0;
  int settle = 0;      // words already in the output register keep the old flag
  always @(posedge clk) if (settle > 0) settle <= settle - 1;
  always @(posedge clk) begin
    if (held_v) check(out_valid && out_data == held, "output held");
    held_v <= out_valid && !out_ready; held <= out_data;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      bit eb;
      check(out_data == 16'(int'(out_src) * 10000 + rcvd[out_src]), $sformatf("order of source %0d", out_src));
      rcvd[out_src]++;
      unique case (out_src)
        SRC_EKG: eb = mode[M_BYP_EKG];
        SRC_EEG: eb = mode[M_BYP_EEG];
        SRC_HRV: eb = 1'b1;
        default: eb = mode[M_BYP_DOT];
      endcase
      if (settle == 0) check(out_bypass == eb, "bypass flag");
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge clk); reset = 0;
    mode = 8'b1010_0000;
    repeat (3000) @(posedge clk);
    mode = 8'b0100_0000; settle = 3;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < 4; i++) check(rcvd[i] > 50, $sformatf("source %0d served %0d", i, rcvd[i]));
    check(n_arb > 0 && n_stall > 0, "arbitration and back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
