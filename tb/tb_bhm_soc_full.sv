// tb_bhm_soc_full: full-size run of the chip top level with its default
// parameters (24 MHz system clock, 1.2 MHz ADC clock, 10 kHz AIC clock,
// EKG 256 Hz, EEG 128 Hz, DOT 24 values/s, 512 training iterations).
//
// Mode 8'h5F (EEG, ICA, EKG, HRV, DOT). Mixed Laplacian sources are fed as
// EEG through the ADC model for 5 half-windows (1.25 s of signal, 30 M
// cycles). Checks: real-time sample rates (EEG instants and EKG instants
// per second, DOT values per second), clock divider periods, the first
// training within the document's worst-case budget of 203757 cycles, the
// number of ICA output words and the correlation of the extracted
// components with the sources, and no overrun or lost event. The HRV and
// DOT processors are replaced by ready-always sinks (no result words).
module tb_bhm_soc_full;
  import bhm_pkg::*;

  localparam int NHALF    = 5;
  localparam int NINST    = NHALF * 32 + 8;
  localparam longint WATCHDOG = 40_000_000;

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
  logic        comp_reset, comp_init_done = 0, comp_valid, comp_bypass, comp_ready = 1;
  logic [15:0] comp_data;
  logic [1:0]  comp_src;
  logic        running, raw_overflow, event_overflow;
  logic [7:0]  current_mode;
  logic        ica_overrun, ica_training, ica_train_done, ica_converged;
  logic [9:0]  ica_iterations;

  bhm_soc dut (.*);

  logic [9:0] eeg_code [4];
  int eeg_count [4];
  int conversions, unsettled;
  logic [9:0] eeg_tab [NINST][4];
  real src [NINST][4];
  real a_mix [4][4] = '{'{1.0,0.6,0.3,0.2},'{0.5,1.0,0.4,0.3},'{0.3,0.5,1.0,0.6},'{0.2,0.3,0.5,1.0}};

  always_comb for (int c = 0; c < 4; c++)
    eeg_code[c] = eeg_tab[(eeg_count[c] < NINST) ? eeg_count[c] : NINST - 1][c];

  aic_adc_model u_adc (
    .adc_clk(adc_clk1200k), .adc_reset, .start(adc_start_conversion), .chsel(adc_chsel),
    .dot_chsel, .led_sel, .eeg_code, .eoc(adc_eoc), .data(adc_data),
    .eeg_count, .conversions, .unsettled);

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

  // compressor: initialisation and collection
  int comp_eeg [$];
  int n_ekg = 0, n_dot = 0;
  int init_cnt = -1;
  always @(posedge clk) begin
    if (comp_reset) init_cnt <= 0;
    else if (init_cnt >= 0 && init_cnt < 96) init_cnt <= init_cnt + 1;
    comp_init_done <= (init_cnt == 95);
    if (comp_valid && comp_ready) begin
      if (comp_src == 2'd1) comp_eeg.push_back(comp_data);
      if (comp_src == 2'd0) n_ekg++;
    end
    if (dot_raw_valid) n_dot++;
  end
  assign hrv_ready = 1'b1;   // unused sink: hrv_valid stays 0

  // clock periods
  longint adc_rise = -1, adc_period = 0, k10_rise = -1, k10_period = 0;
  always @(posedge adc_clk1200k) begin if (adc_rise >= 0) adc_period = cyc - adc_rise; adc_rise = cyc; end
  always @(posedge aic_clk10k)   begin if (k10_rise >= 0) k10_period = cyc - k10_rise; k10_rise = cyc; end

  // training time of the first window
  longint t_start = -1, t_first = -1;
  int n_train = 0;
  always @(posedge clk) begin
    if (dut.u_ica.u_tu.start && t_start < 0) t_start = cyc;
    if (ica_train_done) begin
      n_train++;
      if (t_first < 0) t_first = cyc - t_start;
      $display("[%0d] window trained: %0d iterations", cyc, ica_iterations);
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, mc, mo, sc, so, scov, best, sum, comp;
    int code;
    longint t_run, t_end;
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
    @(negedge clk); rx_mode_valid = 1; rx_mode = 8'h5F;
    @(negedge clk); rx_mode_valid = 0;
    wait (running);
    t_run = cyc;
    wait (eeg_count[3] >= NHALF * 32);
    t_end = cyc;
    repeat (300_000) @(posedge clk);
    $display("%0d EEG instants in %0d cycles, %0d EKG words, %0d DOT values", eeg_count[3], t_end - t_run, n_ekg, n_dot);
    // 128 Hz EEG at 24 MHz: 187500 cycles per instant; the first instant is
    // one 256 Hz period (93750 cycles) after the trigger
    check((t_end - t_run - 93750) / (NHALF * 32 - 1) inside {[187000:188000]}, "EEG sample rate 128 Hz");
    check(n_ekg / 3 inside {[(t_end - t_run) / 93750 - 2 : (t_end - t_run) / 93750 + 4]}, $sformatf("EKG 256 Hz (%0d)", n_ekg / 3));
    check(n_dot inside {[29:32]}, $sformatf("DOT 24 values/s (%0d)", n_dot));
    check(adc_period == 20, $sformatf("ADC clock period %0d", adc_period));
    check(k10_period == 2400, $sformatf("AIC clock period %0d", k10_period));
    check(t_first > 0 && t_first <= 203757, $sformatf("first training %0d cycles", t_first));
    check(n_train == NHALF - 1, $sformatf("trainings %0d", n_train));
    check(comp_eeg.size() == (NHALF - 2) * 128, $sformatf("ICA words %0d", comp_eeg.size()));
    for (int b = 2; b < comp_eeg.size() / 128; b++) begin
      sum = 0;
      for (int c = 0; c < 4; c++) begin
        best = 0;
        for (int k = 0; k < 4; k++) begin
          mc = 0; mo = 0;
          for (int s = 0; s < 32; s++) begin mc += src[(b+1)*32+s][k]; mo += real'($signed(16'(comp_eeg[b*128+s*4+c]))); end
          mc /= 32; mo /= 32; sc = 0; so = 0; scov = 0;
          for (int s = 0; s < 32; s++) begin
            comp = real'($signed(16'(comp_eeg[b*128+s*4+c])));
            sc += (src[(b+1)*32+s][k]-mc)**2; so += (comp-mo)**2; scov += (src[(b+1)*32+s][k]-mc)*(comp-mo);
          end
          if (so > 0 && sc > 0 && (scov**2)/(sc*so) > best**2) best = $sqrt((scov**2)/(sc*so));
        end
        sum += best;
      end
      $display("block %0d mean |corr| %f", b, sum / 4);
      check(sum / 4 >= 0.85, "component correlation");
    end
    check(!ica_overrun && !raw_overflow && !event_overflow, "no overrun or lost event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
