// tb_ica_cu: test of the ICA computation unit.
//
// Loads a random W (Q3.12) through the training unit's stream interface,
// then starts the unit with a random whitening matrix P (Q.24), random
// channel means (Q10.6) and a 32-sample half-window memory. Expected
// words are computed bit-exactly:
//   Wu[r][c]  = sat32((sum_m W[r][m] * P[m][c]) >>> 12)
//   out[s][r] = sat16((sum_k Wu[r][k] * (64*x[s][k] - mean[k])) >>> 22)
// OUT_READY is random, so words must be held while not taken; the
// sequence must be 32 x 4 words in sample/component order, and BUSY must
// drop after the last one. Includes a case that saturates the output.
module tb_ica_cu;
  import ica_pkg::*;
  logic clk = 0, reset = 1, start = 0, w_in_valid = 0, out_ready = 0;
  logic [3:0] w_in_idx = '0;
  word_t w_in_data = '0;
  accmat4_t p_mat;
  mean4_t mean;
  logic [4:0] rd_addr;
  sample4_t rd_data, mem [32];
  logic busy, out_valid;
  word_t out_data;
  always #5 clk = ~clk;
  assign rd_data = mem[rd_addr];
  ica_cu dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_sat = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic longint sat(longint v, int bits);
    longint hi, lo;
    hi = (longint'(1) <<< (bits - 1)) - 1; lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  int got [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(int'(out_data));
    if (out_valid && !out_ready) n_stall++;
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint w [4][4], uw [4][4], acc, e;
    repeat (3) @(posedge clk); reset = 0;
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        w[r][c] = $urandom_range(0, 12288) - 6144;
        p_mat[r][c] = acc_t'($urandom_range(0, 4_000_000)) - 2_000_000;
        if (t == 5) p_mat[r][c] = 32'sd400_000_000;      // forces saturation
      end
      for (int k = 0; k < 4; k++) mean[k] = mean_t'($urandom_range(200, 800) * 64);
      for (int s = 0; s < 32; s++) for (int k = 0; k < 4; k++) mem[s][k] = sample_t'($urandom_range(0, 1023));
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); w_in_valid = 1; w_in_idx = 4'(i); w_in_data = word_t'(w[i / 4][i % 4]);
      end
      @(negedge clk); w_in_valid = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        acc = 0;
        for (int m = 0; m < 4; m++) acc += w[r][m] * longint'(p_mat[m][c]);
        uw[r][c] = sat(acc >>> 12, 32);
      end
      got.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      while (busy) @(negedge clk);
      check(got.size() == 128, $sformatf("words %0d", got.size()));
      for (int s = 0; s < 32; s++) for (int r = 0; r < 4; r++) begin
        acc = 0;
        for (int k = 0; k < 4; k++) acc += uw[r][k] * (longint'(mem[s][k]) * 64 - longint'(mean[k]));
        e = sat(acc >>> 22, 16);
        if (e == 32767 || e == -32768) n_sat++;
        if (s * 4 + r < got.size())
          check(got[s * 4 + r] == int'(e), $sformatf("trial %0d sample %0d comp %0d: %0d expected %0d", t, s, r, got[s*4+r], e));
      end
    end
    check(n_stall > 0, "output stalls exercised");
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
