// tb_bhm_soc: end-to-end test of the brain-heart monitoring chip top level.
//
// Surroundings modelled here: the ADC (aic_adc_model, with a settling model
// that corrupts the first conversion after a channel change), the
// compressor (96-cycle initialisation after the internal reset, random
// READY stalls, collects every word), an HRV processor stand-in (one
// result word per 3 EKG words) and a DOT processor stand-in (one result
// word per DOT value). Divider parameters are reduced so that one EEG
// sampling period is 7000 cycles, still longer than the worst-case
// training time of a half-window (512 iterations).
// Phase 1, mode 8'h5F (EEG, ICA, EKG, HRV, DOT; EKG compression bypassed):
// mixed Laplacian sources are fed as EEG; the ICA components reaching the
// compressor must correlate with the sources. Phase 2, mode 8'h25 (EEG and
// EKG only, ICA bypassed, EEG compression bypassed): the raw EEG words must
// reach the compressor unchanged and the DOT clock must stay off.
// Every mechanism is counted and the test fails if one never happened:
// activation sequence and its cycle timing, clock gating, dummy
// conversions, ADC priority (EEG before EKG), DOT sensor/LED sequence,
// selector priority, compressor back-pressure, compression-bypass flags,
// ICA training with the iteration limit, ICA bypass, raw EEG and EKG paths,
// HRV and DOT result paths.
module tb_bhm_soc;
  import bhm_pkg::*;

  localparam int NHALF    = 8;
  localparam int NINST    = NHALF * 32 + 40;
  localparam int WATCHDOG = 6_000_000;

  logic clk = 0, reset = 1, ica_bypass = 0;
  always #5 clk = ~clk;

  logic        rx_mode_valid = 0;
  logic [7:0]  rx_mode = '0;
  logic        aic_clk10k, adc_clk1200k, adc_reset, adc_start_conversion;
  logic [2:0]  adc_chsel, led_sel;
  logic        adc_eoc;
  logic [9:0]  adc_data;
  logic [3:0]  dot_chsel;
  logic        gclk_hrv, hrv_ekg_valid, hrv_ready;
  logic [9:0]  hrv_ekg_data;
  logic        hrv_valid = 0;
  logic [15:0] hrv_data = '0;
  logic        gclk_dot, dot_raw_valid, dot_ready;
  logic [9:0]  dot_raw_data;
  logic [4:0]  dot_raw_conv;
  logic        dot_valid = 0;
  logic [15:0] dot_data = '0;
  logic        comp_reset, comp_init_done = 0, comp_valid, comp_bypass, comp_ready = 0;
  logic [15:0] comp_data;
  logic [1:0]  comp_src;
  logic        running, raw_overflow, event_overflow;
  logic [7:0]  current_mode;
  logic        ica_overrun, ica_training, ica_train_done, ica_converged;
  logic [9:0]  ica_iterations;

  bhm_soc #(.DIV_ADC(4), .DIV_10K(8), .DIV_256HZ(3500), .DIV_24HZ(5000)) dut (.*);

  // ---------------- ADC ----------------
  logic [9:0] eeg_code [4];
  int eeg_count [4];
  int conversions, unsettled;
  logic [9:0] eeg_tab [NINST][4];
  real src [NINST][4];
  real a_mix [4][4] = '{'{1.0,0.6,0.3,0.2},'{0.5,1.0,0.4,0.3},'{0.3,0.5,1.0,0.6},'{0.2,0.3,0.5,1.0}};
  int  eeg_base = 0;   // instant offset of phase 2

  always_comb for (int c = 0; c < 4; c++)
    eeg_code[c] = eeg_tab[(eeg_count[c] < NINST) ? eeg_count[c] : NINST - 1][c];

  aic_adc_model u_adc (
    .adc_clk(adc_clk1200k), .adc_reset, .start(adc_start_conversion), .chsel(adc_chsel),
    .dot_chsel, .led_sel, .eeg_code, .eoc(adc_eoc), .data(adc_data),
    .eeg_count, .conversions, .unsettled);

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real laplace();
    real u;
    u = (real'($urandom_range(1, 1_000_000))) / 1_000_001.0;
    return ($urandom_range(0,1) ? 1.0 : -1.0) * (-$ln(u));
  endfunction

  // mechanism counters
  int n_cmd = 0, n_init_ok = 0, n_gclk_ica_off = 0, n_gclk_dot_p2 = 0;
  int n_prio_adc = 0, n_led_switch = 0, n_dot_ok = 0, n_pds_arb = 0, n_comp_stall = 0;
  int n_byp_flag_bad = 0, n_byp_flag = 0, n_train = 0, n_limit = 0;
  int n_ekg_ok = 0, n_hrv_ok = 0, n_dotres_ok = 0, n_raw_eeg_ok = 0, n_ica_byp_ok = 0;
  int phase = 0;

  // compressor model
  int comp_eeg [$];
  int comp_ekg [$];
  int comp_hrv [$];
  int comp_dot [$];
  int init_cnt = -1;
  always @(posedge clk) begin
    if (comp_reset) init_cnt <= 0;
    else if (init_cnt >= 0 && init_cnt < 96) init_cnt <= init_cnt + 1;
    comp_init_done <= (init_cnt == 95);
    comp_ready <= ($urandom_range(0, 3) != 0);
    if (comp_valid && !comp_ready) n_comp_stall++;
    if (comp_valid && comp_ready) begin
      bit exp_byp;
      unique case (comp_src)
        2'd0: begin comp_ekg.push_back(comp_data); exp_byp = current_mode[M_BYP_EKG]; end
        2'd1: begin comp_eeg.push_back(comp_data); exp_byp = current_mode[M_BYP_EEG]; end
        2'd2: begin comp_hrv.push_back(comp_data); exp_byp = 1'b1; end
        default: begin comp_dot.push_back(comp_data); exp_byp = current_mode[M_BYP_DOT]; end
      endcase
      n_byp_flag++;
      if (comp_bypass != exp_byp) n_byp_flag_bad++;
    end
  end

  // HRV stand-in: one word per 3 EKG words (their sum)
  int hrv_acc = 0, hrv_n = 0;
  int hrv_q [$];
  int hrv_exp [$];
  always @(posedge clk) begin
    if (hrv_ekg_valid) begin
      hrv_acc += hrv_ekg_data; hrv_n++;
      if (hrv_n == 3) begin hrv_q.push_back(hrv_acc); hrv_exp.push_back(hrv_acc); hrv_acc = 0; hrv_n = 0; end
    end
    if (hrv_valid && hrv_ready) hrv_valid <= 0;
    else if (!hrv_valid && hrv_q.size() > 0) begin hrv_valid <= 1; hrv_data <= 16'(hrv_q.pop_front()); end
  end

  // DOT stand-in: one result word per DOT value, and check of the value
  int dot_q [$];
  int dot_exp [$];
  function automatic int dot_sensor(int n);
    int b [6] = '{0, 1, 2, 4, 5, 6};
    int o [4] = '{0, 4, 1, 5};
    return b[n / 4] + o[n % 4];
  endfunction
  int dot_next = 0;
  always @(posedge clk) begin
    if (dot_raw_valid) begin
      int e;
      e = dot_sensor(dot_next) * 50 + (dot_next / 4) * 5 + 3;
      check(dot_raw_conv == 5'(dot_next) && dot_raw_data == 10'(e),
            $sformatf("DOT value %0d: conv %0d data %0d expected %0d", dot_next, dot_raw_conv, dot_raw_data, e));
      if (dot_raw_data == 10'(e)) n_dot_ok++;
      dot_q.push_back({dot_raw_conv, 1'b0, dot_raw_data});
      dot_exp.push_back({dot_raw_conv, 1'b0, dot_raw_data});
      dot_next = (dot_next + 1) % 24;
    end
    if (dot_valid && dot_ready) dot_valid <= 0;
    else if (!dot_valid && dot_q.size() > 0) begin dot_valid <= 1; dot_data <= 16'(dot_q.pop_front()); end
  end

  // LED switching
  logic [2:0] led_prev = 0;
  always @(posedge clk) begin
    if (led_sel != led_prev && !$past(dut.rst_i)) begin
      check(led_sel == ((led_prev == 5) ? 0 : led_prev + 1), "LED_SEL steps in order");
      n_led_switch++;
    end
    led_prev <= led_sel;
  end

  // ADC priority: when EEG and EKG fall due together the next conversion is EEG channel 1
  bit both_due = 0;
  always @(posedge clk) begin
    if (dut.u_ficu.push_eeg && dut.u_ficu.push_ekg && dut.u_ficu.q_cnt == 0) both_due = 1;
    if (both_due && adc_start_conversion && !$past(adc_start_conversion)) begin
      check(adc_chsel == CHSEL_EEG1, "EEG converted before EKG");
      n_prio_adc++;
      both_due = 0;
    end
  end

  // selector priority: the granted source is the highest-priority valid one
  always @(posedge clk) begin
    if ($countones(dut.src_valid) > 1 && dut.src_ready != 0) begin
      n_pds_arb++;
      for (int i = 0; i < 4; i++)
        if (dut.src_valid[i]) begin
          check(dut.src_ready[i], $sformatf("selector grants source %0d first", i));
          break;
        end
    end
  end

  // clock gating
  always @(posedge dut.gclk_ica) if (!running || phase == 2) n_gclk_ica_off++;
  always @(posedge gclk_dot) if (phase == 2) n_gclk_dot_p2++;

  // training monitor
  always @(posedge clk) if (ica_train_done) begin
    n_train++;
    if (ica_iterations == 10'd512) n_limit++;
    $display("[%0d] window trained: %0d iterations, converged=%0d", cyc, ica_iterations, ica_converged);
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(input logic [7:0] m);
    longint t0;
    @(negedge clk); rx_mode_valid = 1; rx_mode = m;
    @(negedge clk); rx_mode_valid = 0;
    t0 = cyc;
    check(comp_reset == 1, "internal reset follows the command");
    @(posedge comp_init_done);
    @(posedge clk); #1;
    check(running && current_mode == m, "running after INIT_DONE with new mode");
    $display("command %h: running %0d cycles after the command", m, cyc - t0);
    if (running && cyc - t0 == 98) n_init_ok++;
    n_cmd++;
  endtask

  function automatic real corr_best(int b, int c, ref int outs [$], input int base);
    real mc, mo, sc, so, scov, best, comp;
    best = 0;
    for (int k = 0; k < 4; k++) begin
      mc = 0; mo = 0;
      for (int s = 0; s < 32; s++) begin mc += src[base+s][k]; mo += real'($signed(16'(outs[b*128+s*4+c]))); end
      mc /= 32; mo /= 32; sc = 0; so = 0; scov = 0;
      for (int s = 0; s < 32; s++) begin
        comp = real'($signed(16'(outs[b*128+s*4+c])));
        sc += (src[base+s][k]-mc)**2; so += (comp-mo)**2; scov += (src[base+s][k]-mc)*(comp-mo);
      end
      if (so > 0 && sc > 0 && (scov**2)/(sc*so) > best**2) best = $sqrt((scov**2)/(sc*so));
    end
    return best;
  endfunction

  initial begin
    real x, sum, all;
    int code, nblk, ekg_err;
    for (int n = 0; n < NINST; n++) begin
      for (int c = 0; c < 4; c++) src[n][c] = laplace();
      for (int c = 0; c < 4; c++) begin
        x = 512.0;
        for (int k = 0; k < 4; k++) x += 28.0 * a_mix[c][k] * src[n][k];
        code = int'(x);
        if (code < 0) code = 0;
        if (code > 1023) code = 1023;
        eeg_tab[n][c] = 10'(code);
      end
    end
    repeat (20) @(posedge clk);
    reset = 0;
    repeat (50) @(posedge clk);
    check(!running && adc_start_conversion == 0, "inactive before the first command");

    // ---------- phase 1 ----------
    phase = 1;
    command(8'h5F);
    wait (eeg_count[3] >= NHALF * 32);
    repeat (7000 * 3) @(posedge clk);
    nblk = comp_eeg.size() / 128;
    $display("phase 1: %0d ICA words, %0d EKG, %0d HRV, %0d DOT words at the compressor",
             comp_eeg.size(), comp_ekg.size(), comp_hrv.size(), comp_dot.size());
    check(comp_eeg.size() == (NHALF - 2) * 128, $sformatf("ICA output words %0d", comp_eeg.size()));
    all = 0;
    for (int b = 2; b < nblk; b++) begin
      sum = 0;
      for (int c = 0; c < 4; c++) begin
        real r;
        r = corr_best(b, c, comp_eeg, (b + 1) * 32);
        sum += r;
        check(r >= 0.75, $sformatf("block %0d component %0d corr %f", b, c, r));
      end
      $display("block %0d mean |corr| %f", b, sum / 4);
      all += sum / 4;
    end
    check(nblk > 2 && all / (nblk - 2) >= 0.85, $sformatf("mean correlation %f", all / (nblk - 2)));
    // raw EKG path: k-th word of channel c is (k*37 + c*211) mod 1024
    ekg_err = 0;
    for (int i = 0; i < comp_ekg.size(); i++)
      if (comp_ekg[i] != ((i / 3) * 37 + (i % 3) * 211) % 1024) ekg_err++;
    n_ekg_ok = comp_ekg.size() - ekg_err;
    check(ekg_err == 0, $sformatf("%0d wrong EKG words", ekg_err));
    for (int i = 0; i < comp_hrv.size(); i++) if (comp_hrv[i] == hrv_exp[i]) n_hrv_ok++;
    check(n_hrv_ok == comp_hrv.size(), "HRV results in order");
    for (int i = 0; i < comp_dot.size(); i++) if (comp_dot[i] == dot_exp[i]) n_dotres_ok++;
    check(n_dotres_ok == comp_dot.size(), "DOT results in order");
    check(!ica_overrun && !raw_overflow && !event_overflow, "no overrun or overflow");

    // ---------- phase 2 ----------
    comp_eeg.delete(); comp_ekg.delete();
    command(8'h25);
    phase = 2;
    eeg_base = eeg_count[3];
    wait (eeg_count[3] >= eeg_base + 20);
    repeat (7000) @(posedge clk);
    check(comp_eeg.size() >= 80, $sformatf("raw EEG words %0d", comp_eeg.size()));
    for (int i = 0; i < comp_eeg.size(); i++)
      if (comp_eeg[i] == eeg_tab[eeg_base + i / 4][i % 4]) n_raw_eeg_ok++;
    check(n_raw_eeg_ok == comp_eeg.size(), "raw EEG words equal the ADC values");
    check(comp_dot.size() == dot_exp.size(), "no DOT data without the DOT mode bit");

    // ---------- phase 3 ----------
    comp_eeg.delete();
    ica_bypass = 1;
    command(8'h03);
    phase = 3;
    eeg_base = eeg_count[3];
    wait (eeg_count[3] >= eeg_base + 10);
    repeat (7000) @(posedge clk);
    check(comp_eeg.size() >= 40, $sformatf("ICA bypass words %0d", comp_eeg.size()));
    for (int i = 0; i < comp_eeg.size(); i++)
      if (comp_eeg[i] == eeg_tab[eeg_base + i / 4][i % 4]) n_ica_byp_ok++;
    check(n_ica_byp_ok == comp_eeg.size() && n_ica_byp_ok > 0, "ICA bypass words equal the ADC values");

    // ---------- mechanism summary ----------
    $display("mechanisms: commands %0d, init timing ok %0d, dummy(unsettled) conversions %0d of %0d,",
             n_cmd, n_init_ok, unsettled, conversions);
    $display("  ADC priority %0d, LED switches %0d, DOT values ok %0d, selector arbitrations %0d,",
             n_prio_adc, n_led_switch, n_dot_ok, n_pds_arb);
    $display("  compressor stalls %0d, bypass flags %0d (bad %0d), trainings %0d (limit %0d),",
             n_comp_stall, n_byp_flag, n_byp_flag_bad, n_train, n_limit);
    $display("  EKG ok %0d, HRV ok %0d, DOT results ok %0d, raw EEG ok %0d, ICA clock while off %0d, DOT clock in phase 2 %0d",
             n_ekg_ok, n_hrv_ok, n_dotres_ok, n_raw_eeg_ok, n_gclk_ica_off, n_gclk_dot_p2);
    $display("  ICA bypass words ok %0d", n_ica_byp_ok);
    check(n_cmd == 3 && n_init_ok == 3, "activation sequence timing");
    // each later command may cut one conversion pair short
    check(unsettled > 0 && unsettled * 2 >= conversions - 2 && unsettled * 2 <= conversions + 2,
          "every real conversion preceded by a dummy conversion");
    check(n_prio_adc > 0, "ADC priority exercised");
    check(n_led_switch >= 6, "LED switching exercised");
    check(n_dot_ok >= 24, "a full DOT frame converted");
    check(n_pds_arb > 0, "selector arbitration exercised");
    check(n_comp_stall > 0, "compressor back-pressure exercised");
    check(n_byp_flag > 0 && n_byp_flag_bad == 0, "compression-bypass flags");
    check(n_train >= NHALF - 2, "ICA trainings");
    check(n_limit > 0, "iteration limit reached");
    check(n_ekg_ok > 0 && n_hrv_ok > 0 && n_dotres_ok > 0 && n_raw_eeg_ok > 0, "all data paths used");
    check(n_gclk_ica_off == 0, "ICA clock gated while inactive or not processing");
    check(n_gclk_dot_p2 == 0, "DOT clock gated when DOT is off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
