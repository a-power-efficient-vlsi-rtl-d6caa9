// tb_bhm_ficu: test of the front-end interface control unit with the ADC
// model (aic_adc_model, which corrupts the first conversion after a
// channel change).
//
// Reduced dividers: ADC clock = clk/4, AIC clock = clk/8, 256 Hz tick every
// 1000 cycles, 24 Hz tick every 700 cycles. Mode 8'h15 (EEG, EKG, DOT).
// Checks: clock periods; ADC_RESET released; EEG words come 4 per EEG
// event in channel order with the right values, EKG words 3 per event with
// the right values, so every dummy conversion was discarded; EEG events
// every second 256 Hz tick; when EEG and EKG are due together EEG is
// converted first; DOT values follow the sensor/LED mapping and LED_SEL
// advances after every 4th DOT conversion; each START is seen by exactly
// one ADC clock edge. A second unit with a 256 Hz tick of 150 cycles
// (faster than the conversions) must lose events and raise QUEUE_FULL.
// A mode without DOT must produce no DOT conversions.
module tb_bhm_ficu;
  import bhm_pkg::*;
  logic clk = 0, reset = 1, trigger = 0;
  logic [7:0] mode = 8'h15;
  always #5 clk = ~clk;

  logic aic_clk10k, adc_clk1200k, adc_reset, adc_start_conversion, adc_eoc;
  logic [2:0] adc_chsel, led_sel;
  logic [9:0] adc_data;
  logic [3:0] dot_chsel;
  logic eeg_valid, ekg_valid, dot_valid, queue_full;
  logic [9:0] eeg_data, ekg_data, dot_data;
  logic [4:0] dot_conv;

  bhm_ficu #(.DIV_ADC(4), .DIV_10K(8), .DIV_256HZ(1000), .DIV_24HZ(700)) dut (.*);

  logic [9:0] eeg_code [4];
  int eeg_count [4];
  int conversions, unsettled;
  aic_adc_model u_adc (.adc_clk(adc_clk1200k), .adc_reset, .start(adc_start_conversion),
    .chsel(adc_chsel), .dot_chsel, .led_sel, .eeg_code, .eoc(adc_eoc), .data(adc_data),
    .eeg_count, .conversions, .unsettled);
  always_comb for (int c = 0; c < 4; c++) eeg_code[c] = 10'((eeg_count[c] * 13 + c * 250) % 1024);

  // overloaded unit (outputs only observed for QUEUE_FULL)
  logic o_clk10k, o_adcclk, o_adcrst, o_start, o_eoc, o_ev, o_kv, o_dv, o_full;
  logic [2:0] o_chsel, o_led;
  logic [3:0] o_dchsel;
  logic [9:0] o_ed, o_kd, o_dd, o_data;
  logic [4:0] o_dc;
  logic [9:0] o_code [4];
  int o_cnt [4];
  int o_conv, o_uns;
  bhm_ficu #(.DIV_ADC(4), .DIV_10K(8), .DIV_256HZ(150), .DIV_24HZ(100)) dut_fast (
    .clk, .reset, .trigger, .mode(8'h15), .aic_clk10k(o_clk10k), .adc_clk1200k(o_adcclk),
    .adc_reset(o_adcrst), .adc_start_conversion(o_start), .adc_chsel(o_chsel), .adc_eoc(o_eoc),
    .adc_data(o_data), .dot_chsel(o_dchsel), .led_sel(o_led), .eeg_valid(o_ev), .eeg_data(o_ed),
    .ekg_valid(o_kv), .ekg_data(o_kd), .dot_valid(o_dv), .dot_data(o_dd), .dot_conv(o_dc),
    .queue_full(o_full));
  always_comb for (int c = 0; c < 4; c++) o_code[c] = '0;
  aic_adc_model u_adc_fast (.adc_clk(o_adcclk), .adc_reset(o_adcrst), .start(o_start),
    .chsel(o_chsel), .dot_chsel(o_dchsel), .led_sel(o_led), .eeg_code(o_code), .eoc(o_eoc),
    .data(o_data), .eeg_count(o_cnt), .conversions(o_conv), .unsettled(o_uns));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // clocks
  longint adc_r = -1, k_r = -1;
  int adc_per_bad = 0, k_per_bad = 0, n_start_edges = 0;
  always @(posedge adc_clk1200k) begin
    // the first period after reset is a partial one
    if (adc_r >= 0 && cyc > 20 && cyc - adc_r != 4) adc_per_bad++;
    adc_r = cyc;
    if (adc_start_conversion) n_start_edges++;
  end
  always @(posedge aic_clk10k) begin if (k_r >= 0 && cyc - k_r != 8) k_per_bad++; k_r = cyc; end

  // data streams
  int n_eeg = 0, n_ekg = 0, n_dot = 0, n_led = 0, n_prio = 0;
  longint eeg_t [$];
  logic [2:0] led_prev = 0;
  bit both_due = 0;
  function automatic int dot_sensor(int n);
    int b [6] = '{0, 1, 2, 4, 5, 6};
    int o [4] = '{0, 4, 1, 5};
    return b[n / 4] + o[n % 4];
  endfunction
  always @(posedge clk) if (!reset) begin
    if (eeg_valid) begin
      check(eeg_data == 10'(((n_eeg / 4) * 13 + (n_eeg % 4) * 250) % 1024), $sformatf("EEG word %0d", n_eeg));
      if (n_eeg % 4 == 0) eeg_t.push_back(cyc);
      n_eeg++;
    end
    if (ekg_valid) begin
      check(ekg_data == 10'(((n_ekg / 3) * 37 + (n_ekg % 3) * 211) % 1024), $sformatf("EKG word %0d", n_ekg));
      n_ekg++;
    end
    if (dot_valid) begin
      check(dot_conv == 5'(n_dot % 24), "DOT conversion number");
      check(dot_data == 10'(dot_sensor(n_dot % 24) * 50 + ((n_dot % 24) / 4) * 5 + 3),
            $sformatf("DOT value %0d", n_dot));
      n_dot++;
    end
    if (led_sel != led_prev) begin
      check(n_dot % 4 == 0 && led_sel == 3'((n_dot / 4) % 6), "LED_SEL after every 4th DOT value");
      n_led++;
    end
    led_prev <= led_sel;
    if (dut.push_eeg && dut.push_ekg && dut.q_cnt == 0) both_due = 1;
    if (both_due && adc_start_conversion && !$past(adc_start_conversion)) begin
      check(adc_chsel == CHSEL_EEG1, "EEG before EKG");
      n_prio++; both_due = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk); reset = 0;
    repeat (20) @(posedge clk);
    check(!adc_reset, "ADC reset released");
    check(conversions == 0, "idle before the trigger");
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    repeat (60000) @(posedge clk);
    $display("EEG %0d, EKG %0d, DOT %0d words; %0d conversions, %0d unsettled; %0d LED switches; %0d priority cases",
             n_eeg, n_ekg, n_dot, conversions, unsettled, n_led, n_prio);
    check(adc_per_bad == 0 && k_per_bad == 0, $sformatf("clock periods (%0d, %0d bad)", adc_per_bad, k_per_bad));
    check(n_eeg >= 4 * 29 && n_eeg % 4 == 0, "EEG events");
    check(n_ekg >= 3 * 58, "EKG events");
    check(n_dot >= 80, "DOT values");
    check(unsettled * 2 == conversions, "one dummy conversion per real one");
    check(n_start_edges == conversions, "each START sampled once");
    for (int i = 1; i < eeg_t.size(); i++)
      check(eeg_t[i] - eeg_t[i-1] inside {[1990:2010]}, $sformatf("EEG period %0d", eeg_t[i] - eeg_t[i-1]));
    check(n_led >= 18, "LED switching");
    check(n_prio > 0, "ADC priority exercised");
    check(!queue_full, "no lost event at the nominal rates");
    check(o_full, "lost events flagged when overloaded");
    // mode without DOT
    mode = 8'h05;
    begin
      int d0;
      repeat (3000) @(posedge clk);
      d0 = n_dot;
      repeat (10000) @(posedge clk);
      check(n_dot == d0, "no DOT conversion without the DOT bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
