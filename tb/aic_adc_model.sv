// aic_adc_model: behavioural model of the analog front-end's time-multiplexed
// 10-bit ADC, for testbenches only (the analog chip is outside the design).
//
// Handshake as the document describes it: START_CONVERSION is sampled on a
// rising ADC clock edge; the conversion takes 12 ADC cycles counting that
// edge; EOC is then high for one ADC cycle with DATA valid. A START seen
// while a conversion runs is ignored. ADC_RESET holds the model idle.
// Settling model (this testbench's choice): the first conversion after the
// channel selection (ADC_CHSEL, DOT_CHSEL, LED_SEL) changes returns a wrong,
// unsettled value (the bitwise inverse of the correct one), so a front end
// that does not discard a dummy conversion gets wrong data.
// Channel values:
//   ADC_CHSEL 0..3 (EEG): EEG_CODE[c], driven by the testbench; the model
//     counts settled EEG conversions per channel in EEG_COUNT[c].
//   ADC_CHSEL 4..6 (EKG): (k*37 + c*211) mod 1024 for the k-th settled
//     conversion of EKG channel c.
//   ADC_CHSEL 7 (DOT): DOT_CHSEL*50 + LED_SEL*5 + 3 (always <= 900).
module aic_adc_model (
  input  logic       adc_clk,
  input  logic       adc_reset,
  input  logic       start,
  input  logic [2:0] chsel,
  input  logic [3:0] dot_chsel,
  input  logic [2:0] led_sel,
  input  logic [9:0] eeg_code [4],
  output logic       eoc,
  output logic [9:0] data,
  output int         eeg_count [4],
  output int         conversions,
  output int         unsettled
);

  int         ekg_count [3];
  int         cnt = 0;
  logic [9:0] result;
  logic [12:0] last_sel = '1;
  logic       bad;

  initial begin
    eoc = 0; data = '0; conversions = 0; unsettled = 0;
    foreach (eeg_count[i]) eeg_count[i] = 0;
    foreach (ekg_count[i]) ekg_count[i] = 0;
  end

  always @(posedge adc_clk) begin
    eoc <= 1'b0;
    if (adc_reset) cnt = 0;
    else if (cnt != 0) begin
      cnt++;
      if (cnt == 12) begin
        eoc <= 1'b1; data <= result; cnt = 0;
      end
    end else if (start) begin
      cnt = 1;
      conversions++;
      bad = ({chsel, dot_chsel, led_sel, 3'b0} != last_sel);
      last_sel = {chsel, dot_chsel, led_sel, 3'b0};
      if (chsel < 4) begin
        result = eeg_code[chsel[1:0]];
        if (!bad) eeg_count[chsel[1:0]]++;
      end else if (chsel < 7) begin
        result = 10'((ekg_count[chsel - 4] * 37 + (chsel - 4) * 211) % 1024);
        if (!bad) ekg_count[chsel - 4]++;
      end else result = 10'(dot_chsel * 50 + led_sel * 5 + 3);
      if (bad) begin result = ~result; unsettled++; end
    end
  end

endmodule
